// regfile_tb: self-checking testbench of the register file.
// Checks the reset values (SP = FFFF, others 0), random writes and reads on
// both ports against a shadow copy, and write-through: a read of the register
// being written in the same cycle returns the new value.
module regfile_tb;
  import wisc_pkg::*;

  logic clk = 0, rst = 1;
  logic [3:0] ra_addr, rb_addr, wa;
  word_t ra_data, rb_data, wd;
  logic we = 0;
  word_t shadow [16];
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    ra_addr = 0; rb_addr = 0; wa = 0; wd = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 16; i++) begin
      shadow[i] = (i == 15) ? 16'hFFFF : 16'h0;
      ra_addr = 4'(i); rb_addr = 4'(15 - i); #1;
      chk(ra_data == shadow[i], $sformatf("reset r%0d = %h", i, ra_data));
    end
    repeat (5000) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      wa = 4'($urandom); wd = 16'($urandom);
      ra_addr = 4'($urandom); rb_addr = ($urandom_range(0, 3) == 0) ? wa : 4'($urandom);
      #1;
      chk(ra_data == ((we && wa == ra_addr) ? wd : shadow[ra_addr]), $sformatf("port A r%0d", ra_addr));
      chk(rb_data == ((we && wa == rb_addr) ? wd : shadow[rb_addr]), $sformatf("port B r%0d", rb_addr));
      @(posedge clk);
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
