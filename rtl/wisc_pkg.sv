// wisc_pkg: types and constants shared by the WISC-F07 processor.
//
// WISC-F07 is a 16-bit load/store machine with sixteen 16-bit registers
// ($14 is the data segment register DS, $15 the stack pointer SP) and a
// 3-bit FLAG register (Z, V, N). Every instruction is one 16-bit word whose
// top four bits are the opcode:
//   0aaa dddd ssss tttt   ADD SUB NAND XOR INC SRA SRL SLL (rd, rs, rt/imm4)
//   10aa tttt oooo oooo   LW SW (rt, DS-relative offset) LHB LLB (rt, imm8)
//   1100 xccc iiii iiii   B cond, PC-relative offset
//   1101 gggg gggg gggg   CALL target (low 12 bits)
//   1110 xxxx xxxx xxxx   RET
// The opcode values and branch condition codes follow the specification;
// opcode 1111 is not assigned there and is executed as a no-operation here.
// The ALU operation and writeback-source encodings are internal choices.
package wisc_pkg;

  localparam int unsigned XLEN = 16;
  localparam int unsigned NREGS = 16;
  localparam logic [3:0] REG_DS = 4'd14;
  localparam logic [3:0] REG_SP = 4'd15;
  localparam logic [15:0] SP_RESET = 16'hFFFF;

  typedef logic [XLEN-1:0] word_t;

  typedef enum logic [3:0] {
    OP_ADD  = 4'b0000,
    OP_SUB  = 4'b0001,
    OP_NAND = 4'b0010,
    OP_XOR  = 4'b0011,
    OP_INC  = 4'b0100,
    OP_SRA  = 4'b0101,
    OP_SRL  = 4'b0110,
    OP_SLL  = 4'b0111,
    OP_LW   = 4'b1000,
    OP_SW   = 4'b1001,
    OP_LHB  = 4'b1010,
    OP_LLB  = 4'b1011,
    OP_B    = 4'b1100,
    OP_CALL = 4'b1101,
    OP_RET  = 4'b1110,
    OP_NOP  = 4'b1111
  } opcode_e;

  // Branch conditions (ccc field)
  typedef enum logic [2:0] {
    C_EQ  = 3'b000,
    C_LT  = 3'b001,
    C_GT  = 3'b010,
    C_OVF = 3'b011,
    C_NE  = 3'b100,
    C_GEQ = 3'b101,
    C_LEQ = 3'b110,
    C_TRUE = 3'b111
  } cond_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_NAND, ALU_XOR, ALU_SRA, ALU_SRL, ALU_SLL,
    ALU_LHB, ALU_LLB
  } alu_op_e;

  // Second ALU operand
  typedef enum logic [2:0] {
    B_REG,      // (rt)
    B_SIMM4,    // sign-extended imm4 (INC)
    B_UIMM4,    // zero-extended imm4 (shift amount)
    B_IMM8,     // zero-extended imm8 (LHB/LLB byte)
    B_SIMM8,    // sign-extended offset8 (LW/SW address)
    B_ONE       // constant 1 (stack pointer step for CALL/RET)
  } bsel_e;

  typedef struct packed {
    logic    z;
    logic    v;
    logic    n;
  } flags_t;

  // Control word produced by the decoder and carried down the pipeline.
  typedef struct packed {
    alu_op_e    alu_op;
    bsel_e      b_sel;
    logic       flag_we;   // write Z, V, N
    logic       reg_we;    // write destination register
    logic [3:0] dest;      // destination register number
    logic [3:0] src_a;     // register read on port A
    logic [3:0] src_b;     // register read on port B
    logic       use_a;     // port A value is needed
    logic       use_b;     // port B value is needed
    logic       mem_rd;    // data memory read (LW, RET)
    logic       mem_wr;    // data memory write (SW, CALL)
    logic       wb_mem;    // register written from memory (LW)
    logic       is_branch;
    logic       is_call;
    logic       is_ret;
  } ctrl_t;

endpackage
