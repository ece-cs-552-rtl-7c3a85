// alu: the WISC-F07 arithmetic and logic unit.
//
// Combinational. Computes y = a OP b for the eight arithmetic instructions
// and the byte merges of LHB/LLB, and the Z, V and N values the instruction
// would write into the FLAG register:
//   ADD/SUB  two's-complement add/subtract; Z = (y == 0), V = signed
//            overflow, N = sign bit of y.  INC is ADD with the sign-extended
//            4-bit immediate as b, so it sets the flags the same way.
//   NAND/XOR bitwise; Z = (y == 0), V and N cleared.
//   SRA/SRL/SLL shift a by b[3:0] bits (flags are not written for them;
//            the decoder leaves flag_we low, the values here are don't-care).
//   LHB      y = {b[7:0], a[7:0]};  LLB  y = {a[15:8], b[7:0]}.
// Operations and flag rules follow the specification; taking N as the sign
// bit of the 16-bit result (also when V is set) is this design's reading.
module alu
  import wisc_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output flags_t  flags
);

  logic [15:0] sum;
  logic [15:0] b_eff;
  logic        is_sub;

  always_comb begin
    is_sub = (op == ALU_SUB);
    b_eff  = is_sub ? ~b : b;
    sum    = a + b_eff + {15'd0, is_sub};
  end

  always_comb begin
    y = '0;
    flags = '0;
    unique case (op)
      ALU_ADD, ALU_SUB: begin
        y = sum;
        flags.z = (y == '0);
        // overflow: operands of equal sign give a result of the other sign
        flags.v = (a[15] == b_eff[15]) && (y[15] != a[15]);
        flags.n = y[15];
      end
      ALU_NAND: begin
        y = ~(a & b);
        flags.z = (y == '0);
      end
      ALU_XOR: begin
        y = a ^ b;
        flags.z = (y == '0);
      end
      ALU_SRA: y = word_t'($signed(a) >>> b[3:0]);
      ALU_SRL: y = a >> b[3:0];
      ALU_SLL: y = a << b[3:0];
      ALU_LHB: y = {b[7:0], a[7:0]};
      ALU_LLB: y = {a[15:8], b[7:0]};
      default: y = '0;
    endcase
  end

endmodule
