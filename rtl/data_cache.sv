// data_cache: the simplified WISC-F07 data cache.
//
// As the specification puts it, the data cache is as big as main memory
// (64K 16-bit words) and every access hits, so it is modelled as a
// single-cycle word memory: the processor's memory stage presents `addr`
// with `re` or `we`; a write takes effect on that clock edge, read data
// appears on `rdata` in the following cycle (registered read, so it maps to
// a block RAM). CALL and SW write through this port, LW and RET read.
// A second write-only port, `load_*`, lets the system place an initial
// memory image; it is this design's addition and has priority over the
// processor port when both write the same word in one cycle.
module data_cache
  import wisc_pkg::*;
#(
  parameter int unsigned ADDR_W = 16   // 2**16 = 64K words
) (
  input  logic              clk,
  input  logic              re,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  word_t             wdata,
  output word_t             rdata,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  word_t             load_data
);

  word_t mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we)      mem[addr] <= wdata;
    if (load_we) mem[load_addr] <= load_data;
    if (re)      rdata <= mem[addr];
  end

endmodule
