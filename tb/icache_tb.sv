// icache_tb: self-checking testbench of the instruction cache.
// The cache refills from a behavioural main memory here (pair requests
// answered after LAT cycles, one per cycle). Fetch addresses are drawn from
// a few regions so that blocks are reused and also evicted by conflicting
// blocks. For every fetch the testbench keeps its own copy of the tags:
// a fetch whose block it holds must hit at once, any other must miss and
// hit exactly LAT + 5 cycles later; the instruction must equal the memory
// word. The 2-word bus must carry exactly 4 requests per refill.
module icache_tb;
  import wisc_pkg::*;
  localparam int unsigned LAT = 4;

  logic clk = 0, rst = 1;
  word_t addr = '0, instr;
  logic hit, mem_req, mem_rvalid;
  logic [14:0] mem_addr;
  logic [31:0] mem_rdata;
  int checks = 0, failures = 0;
  int unsigned n_req = 0, n_fill_exp = 0, n_hits = 0, n_misses = 0;

  icache dut (.*);
  always #5 clk = ~clk;

  // behavioural main memory: word i holds a hash of i
  function automatic word_t memword(logic [15:0] a);
    return a * 16'd40503 ^ 16'h5A3C;
  endfunction
  logic [31:0] pd [LAT];
  logic        pv [LAT];
  always @(posedge clk) begin
    pd[0] <= {memword({mem_addr, 1'b1}), memword({mem_addr, 1'b0})};
    pv[0] <= mem_req && !rst;
    for (int i = 1; i < LAT; i++) begin pd[i] <= pd[i-1]; pv[i] <= pv[i-1]; end
    if (mem_req && !rst) n_req++;
  end
  assign mem_rdata = pd[LAT-1];
  assign mem_rvalid = pv[LAT-1];

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] ref_tag [8];
  bit         ref_valid [8];

  initial begin
    int wait_cyc;
    bit expect_hit;
    logic [2:0] ix;
    foreach (ref_valid[i]) ref_valid[i] = 0;
    for (int i = 0; i < LAT; i++) pv[i] = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      // regions 0x0000, 0x0040 (same indices) and 0x1230
      addr = 16'($urandom_range(0, 2) * 16'h0040 + ($urandom_range(0, 1) ? 16'h1230 : 16'h0) + $urandom_range(0, 63));
      ix = addr[5:3];
      expect_hit = ref_valid[ix] && ref_tag[ix] == addr[15:6];
      wait_cyc = 0;
      #1;
      while (!hit && wait_cyc < 100) begin
        @(negedge clk);
        wait_cyc++;
      end
      checks++;
      if (expect_hit ? (wait_cyc != 0) : (wait_cyc != LAT + 5)) begin
        failures++;
        $display("FAIL %h: expected %s, hit after %0d cycles", addr, expect_hit ? "hit" : "miss", wait_cyc);
      end
      if (!expect_hit) begin n_fill_exp++; n_misses++; end else n_hits++;
      ref_valid[ix] = 1; ref_tag[ix] = addr[15:6];
      checks++;
      if (instr !== memword(addr)) begin
        failures++;
        $display("FAIL %h: instr %h expected %h", addr, instr, memword(addr));
      end
      @(negedge clk);
    end
    checks++;
    if (n_req != 4 * n_fill_exp) begin failures++; $display("FAIL %0d bus requests for %0d refills", n_req, n_fill_exp); end
    checks++;
    if (n_hits == 0 || n_misses == 0) failures++;
    $display("hits=%0d misses=%0d", n_hits, n_misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
