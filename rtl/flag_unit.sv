// flag_unit: the FLAG register (Z, V, N) and the branch condition logic.
//
// The three flags are written on the rising clock edge when `we` is high
// (ADD, SUB, NAND, XOR and INC in the execute stage); shifts, loads, stores
// and control instructions leave them alone. `cond_true` is combinational
// and evaluates the 3-bit condition field of a branch on the flags as they
// stand, per the specification's condition table:
//   000 EQ  Z            001 LT  N & ~V          010 GT  ~Z & ~N & ~V
//   011 OV  V            100 NE  ~Z              101 GEQ ~(N & ~V)
//   110 LEQ (N & ~V) | Z 111 always
// Reset (synchronous, active high) clears the flags; the specification only
// resets PC and SP, so this is this design's choice.
module flag_unit
  import wisc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       we,
  input  flags_t     flags_in,
  output flags_t     flags,
  input  logic [2:0] cond,
  output logic       cond_true
);

  always_ff @(posedge clk) begin
    if (rst)     flags <= '0;
    else if (we) flags <= flags_in;
  end

  logic lt;
  always_comb begin
    lt = flags.n && !flags.v;
    unique case (cond_e'(cond))
      C_EQ:    cond_true = flags.z;
      C_LT:    cond_true = lt;
      C_GT:    cond_true = !flags.z && !flags.n && !flags.v;
      C_OVF:   cond_true = flags.v;
      C_NE:    cond_true = !flags.z;
      C_GEQ:   cond_true = !lt;
      C_LEQ:   cond_true = lt || flags.z;
      C_TRUE:  cond_true = 1'b1;
      default: cond_true = 1'b0;
    endcase
  end

endmodule
