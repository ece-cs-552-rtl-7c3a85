// regfile: the WISC-F07 register file.
//
// Sixteen 16-bit registers with two combinational read ports and one write
// port written on the rising clock edge. $14 is the data segment register
// (base of LW/SW addresses) and $15 the stack pointer used by CALL and RET;
// the file itself treats them like the others. A read of the register being
// written in the same cycle returns the new value (write-through), the usual
// "write in the first half, read in the second half" arrangement of a
// five-stage pipeline, so an instruction in decode sees the value of the one
// in writeback.
// Reset is synchronous and active high: the specification sets SP to FFFF;
// clearing the other registers to zero is this design's choice.
module regfile
  import wisc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] ra_addr,
  output word_t      ra_data,
  input  logic [3:0] rb_addr,
  output word_t      rb_data,
  input  logic       we,
  input  logic [3:0] wa,
  input  word_t      wd
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
      regs[REG_SP] <= SP_RESET;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    ra_data = (we && wa == ra_addr) ? wd : regs[ra_addr];
    rb_data = (we && wa == rb_addr) ? wd : regs[rb_addr];
  end

endmodule
