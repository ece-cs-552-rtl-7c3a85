// main_memory: WISC-F07 main memory, 64K 16-bit words, with the 2-word
// (32-bit) read bus that refills the instruction cache.
//
// A request names a word pair by `req_addr` (word address >> 1). The pair is
// returned on `rdata` ({odd word, even word}) with `rvalid` exactly LATENCY
// cycles after the request; one request may be issued every cycle, so a
// burst of requests is answered in the same order one per cycle.
// Storage is one 16-bit array; the write-only `load_*` port places the
// program image (the processor never writes main memory: stores go to the
// data cache and the instruction cache is never written).
// Size and bus width follow the specification; the latency is not given
// there and is this design's parameter (default 4 cycles).
module main_memory
  import wisc_pkg::*;
#(
  parameter int unsigned ADDR_W  = 16,  // word address width: 64K words
  parameter int unsigned LATENCY = 4    // request-to-data cycles, >= 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              req,
  input  logic [ADDR_W-2:0] req_addr,
  output logic [31:0]       rdata,
  output logic              rvalid,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  word_t             load_data
);

  word_t mem [2**ADDR_W];

  logic [31:0] pipe_data  [LATENCY];
  logic        pipe_valid [LATENCY];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
    pipe_data[0] <= {mem[{req_addr, 1'b1}], mem[{req_addr, 1'b0}]};
    for (int i = 1; i < int'(LATENCY); i++) pipe_data[i] <= pipe_data[i-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(LATENCY); i++) pipe_valid[i] <= 1'b0;
    end else begin
      pipe_valid[0] <= req;
      for (int i = 1; i < int'(LATENCY); i++) pipe_valid[i] <= pipe_valid[i-1];
    end
  end

  assign rdata  = pipe_data[LATENCY-1];
  assign rvalid = pipe_valid[LATENCY-1];

endmodule
