// flag_unit_tb: self-checking testbench of the FLAG register and the branch
// condition logic. Checks reset, that the register only changes when written,
// and all eight conditions for all eight flag values against the condition
// table (EQ, LT, GT, OV, NE, GEQ, LEQ, true).
module flag_unit_tb;
  import wisc_pkg::*;

  logic clk = 0, rst = 1, we = 0;
  flags_t flags_in, flags;
  logic [2:0] cond;
  logic cond_true;
  int checks = 0, failures = 0;

  flag_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit expect_cond(int c, bit z, bit v, bit n);
    case (c)
      0: return z == 1;
      1: return n == 1 && v == 0;
      2: return z == 0 && n == 0 && v == 0;
      3: return v == 1;
      4: return z == 0;
      5: return !(n == 1 && v == 0);
      6: return (n == 1 && v == 0) || z == 1;
      default: return 1;
    endcase
  endfunction

  initial begin
    flags_in = '0; cond = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    checks++; if (flags != 3'b000) failures++;
    for (int f = 0; f < 8; f++) begin
      @(negedge clk);
      flags_in = 3'(f); we = 1;
      @(negedge clk);
      we = 0; flags_in = ~3'(f);
      @(negedge clk);
      checks++;
      if (flags != 3'(f)) begin failures++; $display("FAIL hold %b", flags); end
      for (int c = 0; c < 8; c++) begin
        cond = 3'(c); #1;
        checks++;
        if (cond_true != expect_cond(c, f[2], f[1], f[0])) begin
          failures++;
          $display("FAIL cond %0d flags %b -> %b", c, 3'(f), cond_true);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
