// decoder: the WISC-F07 control unit.
//
// Combinational. Turns one instruction word into the control word (ctrl_t)
// that travels with the instruction down the pipeline: ALU operation and
// second-operand source, which registers are read (port A / port B) and
// whether their values are needed, the destination register and its write
// enable, FLAG write enable, memory read/write and the control-transfer kind.
// How each instruction uses the datapath:
//   ADD/SUB/NAND/XOR  A=rs, B=rt, rd <- A op B, flags written
//   INC               A=rs, rd <- A + sext(imm4), flags written
//   SRA/SRL/SLL       A=rs, rd <- A shifted by imm4 (unsigned)
//   LW                A=$14, addr = A + sext(off8), rt <- mem
//   SW                A=$14, B=rt, mem[A + sext(off8)] <- B
//   LHB/LLB           A=rt, rt <- byte merge of A and imm8
//   B                 no register; condition and offset taken in execute
//   CALL              A=$15, mem[A] <- PC+1, $15 <- A - 1
//   RET               A=$15, $15 <- A + 1, PC <- mem[A + 1]
// The instruction semantics are the specification's; the split into these
// control signals is this design's. Opcode 1111 has no function in the
// specification and decodes to a no-operation.
module decoder
  import wisc_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl
);

  logic [3:0] f_d, f_s, f_t;
  opcode_e    op;

  always_comb begin
    op  = opcode_e'(instr[15:12]);
    f_d = instr[11:8];
    f_s = instr[7:4];
    f_t = instr[3:0];

    ctrl = '0;
    ctrl.alu_op = ALU_ADD;
    ctrl.b_sel  = B_REG;

    unique case (op)
      OP_ADD, OP_SUB, OP_NAND, OP_XOR: begin
        unique case (op)
          OP_ADD:  ctrl.alu_op = ALU_ADD;
          OP_SUB:  ctrl.alu_op = ALU_SUB;
          OP_NAND: ctrl.alu_op = ALU_NAND;
          default: ctrl.alu_op = ALU_XOR;
        endcase
        ctrl.src_a = f_s;  ctrl.use_a = 1'b1;
        ctrl.src_b = f_t;  ctrl.use_b = 1'b1;
        ctrl.dest = f_d;   ctrl.reg_we = 1'b1;
        ctrl.flag_we = 1'b1;
      end
      OP_INC: begin
        ctrl.alu_op = ALU_ADD;
        ctrl.b_sel  = B_SIMM4;
        ctrl.src_a = f_s;  ctrl.use_a = 1'b1;
        ctrl.dest = f_d;   ctrl.reg_we = 1'b1;
        ctrl.flag_we = 1'b1;
      end
      OP_SRA, OP_SRL, OP_SLL: begin
        unique case (op)
          OP_SRA:  ctrl.alu_op = ALU_SRA;
          OP_SRL:  ctrl.alu_op = ALU_SRL;
          default: ctrl.alu_op = ALU_SLL;
        endcase
        ctrl.b_sel = B_UIMM4;
        ctrl.src_a = f_s;  ctrl.use_a = 1'b1;
        ctrl.dest = f_d;   ctrl.reg_we = 1'b1;
      end
      OP_LW: begin
        ctrl.b_sel = B_SIMM8;
        ctrl.src_a = REG_DS; ctrl.use_a = 1'b1;
        ctrl.dest = f_d;     ctrl.reg_we = 1'b1;
        ctrl.mem_rd = 1'b1;  ctrl.wb_mem = 1'b1;
      end
      OP_SW: begin
        ctrl.b_sel = B_SIMM8;
        ctrl.src_a = REG_DS; ctrl.use_a = 1'b1;
        ctrl.src_b = f_d;    ctrl.use_b = 1'b1;
        ctrl.mem_wr = 1'b1;
      end
      OP_LHB, OP_LLB: begin
        ctrl.alu_op = (op == OP_LHB) ? ALU_LHB : ALU_LLB;
        ctrl.b_sel = B_IMM8;
        ctrl.src_a = f_d;  ctrl.use_a = 1'b1;
        ctrl.dest = f_d;   ctrl.reg_we = 1'b1;
      end
      OP_B: begin
        ctrl.is_branch = 1'b1;
      end
      OP_CALL: begin
        ctrl.alu_op = ALU_SUB;
        ctrl.b_sel = B_ONE;
        ctrl.src_a = REG_SP; ctrl.use_a = 1'b1;
        ctrl.dest = REG_SP;  ctrl.reg_we = 1'b1;
        ctrl.mem_wr = 1'b1;
        ctrl.is_call = 1'b1;
      end
      OP_RET: begin
        ctrl.alu_op = ALU_ADD;
        ctrl.b_sel = B_ONE;
        ctrl.src_a = REG_SP; ctrl.use_a = 1'b1;
        ctrl.dest = REG_SP;  ctrl.reg_we = 1'b1;
        ctrl.mem_rd = 1'b1;
        ctrl.is_ret = 1'b1;
      end
      default: ;  // OP_NOP
    endcase
  end

endmodule
