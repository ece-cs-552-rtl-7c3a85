// data_cache_tb: self-checking testbench of the always-hit data cache.
// Random reads and writes on the processor port and the load port, with
// read-after-write to the same word, checked against a shadow array; read
// data must appear exactly one cycle after the read.
module data_cache_tb;
  import wisc_pkg::*;
  localparam int unsigned AW = 16;

  logic clk = 0, re = 0, we = 0, load_we = 0;
  logic [AW-1:0] addr = '0, load_addr = '0;
  word_t wdata = '0, rdata, load_data = '0;
  word_t shadow [logic [AW-1:0]];
  int checks = 0, failures = 0;

  data_cache #(.ADDR_W(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] a;
    // place a small image through the load port
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = AW'(i); load_data = 16'($urandom);
      shadow[load_addr] = load_data;
    end
    @(negedge clk);
    load_we = 0;
    for (int n = 0; n < 20000; n++) begin
      a = AW'($urandom_range(0, 63));
      re = 0; we = 0;
      if ($urandom_range(0, 1)) begin
        we = 1; addr = a; wdata = 16'($urandom);
      end else begin
        re = 1; addr = a;
      end
      @(posedge clk);
      if (we) shadow[a] = wdata;
      #1;
      if (re) begin
        checks++;
        if (rdata !== shadow[a]) begin
          failures++;
          $display("FAIL read %h = %h expected %h", a, rdata, shadow[a]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
