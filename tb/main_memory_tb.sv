// main_memory_tb: self-checking testbench of main memory and its 2-word bus.
// Writes random words through the load port, then issues word-pair requests
// (back-to-back bursts and isolated ones); each must be answered exactly
// LATENCY cycles later with {odd word, even word} of the pair, and rvalid
// must never rise without a request.
module main_memory_tb;
  import wisc_pkg::*;
  localparam int unsigned AW = 16;
  localparam int unsigned LAT = 4;

  logic clk = 0, rst = 1, req = 0, rvalid, load_we = 0;
  logic [AW-2:0] req_addr = '0;
  logic [31:0] rdata;
  logic [AW-1:0] load_addr = '0;
  word_t load_data = '0;
  word_t shadow [1024];
  int checks = 0, failures = 0;
  longint cycle = 0;

  main_memory #(.ADDR_W(AW), .LATENCY(LAT)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected responses, tagged with the cycle they are due
  longint due [$];
  logic [31:0] want [$];

  always @(posedge clk) if (!rst) begin
    if (rvalid) begin
      checks++;
      if (due.size() == 0 || due[0] != cycle || rdata !== want[0]) begin
        failures++;
        $display("FAIL cycle %0d: rdata %h", cycle, rdata);
      end
      if (due.size() > 0) begin void'(due.pop_front()); void'(want.pop_front()); end
    end else if (due.size() > 0 && due[0] <= cycle) begin
      checks++; failures++;
      $display("FAIL cycle %0d: response missing", cycle);
      void'(due.pop_front()); void'(want.pop_front());
    end
    if (req) begin
      due.push_back(cycle + LAT);
      want.push_back({shadow[{req_addr[8:0], 1'b1}], shadow[{req_addr[8:0], 1'b0}]});
    end
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 1024; i++) begin
      load_we = 1; load_addr = AW'(i); load_data = 16'($urandom);
      shadow[i] = load_data;
      @(negedge clk);
    end
    load_we = 0;
    for (int n = 0; n < 5000; n++) begin
      req = ($urandom_range(0, 2) != 0);
      req_addr = (AW-1)'($urandom_range(0, 511));
      @(negedge clk);
    end
    req = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (due.size() != 0) begin failures++; $display("FAIL %0d responses outstanding", due.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
