// icache: WISC-F07 direct-mapped instruction cache.
//
// 64 words in 8 blocks of 8 words. A 16-bit fetch address splits into
// tag [15:6], index [5:3] and word offset [2:0]. Lookup is combinational:
// `hit` and `instr` are valid in the same cycle as `addr`, so a hit costs
// the fetch stage nothing.
//
// On a miss the cache refills the whole block from main memory over the
// 2-word (32-bit) bus: it invalidates the line, issues BEATS = 4 pair
// requests on consecutive cycles and writes each returned pair into the
// line; when the last pair is in it sets the tag and valid bit and the next
// lookup hits. The refill always runs to the end, even if the fetch address
// moves away meanwhile. With a memory latency of L cycles, a fetch that
// misses in cycle t hits in cycle t + L + 5 (one cycle to detect the miss,
// four request cycles, L cycles to the last pair). The cache is never written by stores.
// Reset (synchronous, active high) clears all valid bits.
// Size, organisation and bus width follow the specification; the refill
// sequencing is this design's choice.
module icache
  import wisc_pkg::*;
#(
  parameter int unsigned WORDS  = 64,  // total capacity in words
  parameter int unsigned BLOCKS = 8    // number of blocks (lines)
) (
  input  logic        clk,
  input  logic        rst,
  // fetch side
  input  word_t       addr,
  output word_t       instr,
  output logic        hit,
  // main memory side (word-pair requests)
  output logic        mem_req,
  output logic [14:0] mem_addr,
  input  logic [31:0] mem_rdata,
  input  logic        mem_rvalid
);

  localparam int unsigned BW    = WORDS / BLOCKS;      // words per block
  localparam int unsigned OFF_W = $clog2(BW);
  localparam int unsigned IDX_W = $clog2(BLOCKS);
  localparam int unsigned TAG_W = XLEN - OFF_W - IDX_W;
  localparam int unsigned BEATS = BW / 2;              // 2 words per transfer
  localparam int unsigned BEAT_W = (BEATS > 1) ? $clog2(BEATS) : 1;

  word_t             data  [WORDS];
  logic [TAG_W-1:0]  tags  [BLOCKS];
  logic              valid [BLOCKS];

  logic [IDX_W-1:0]  idx;
  logic [TAG_W-1:0]  tag;

  typedef enum logic { IDLE, FILL } state_e;
  state_e state;

  logic [XLEN-OFF_W-1:0] fill_blk;   // {tag, index} of the block being filled
  logic [BEAT_W:0]       issued;     // pair requests sent
  logic [BEAT_W:0]       received;   // pairs written

  always_comb begin
    idx   = addr[OFF_W +: IDX_W];
    tag   = addr[XLEN-1 -: TAG_W];
    hit   = valid[idx] && (tags[idx] == tag);
    instr = data[addr[OFF_W+IDX_W-1:0]];
  end

  logic [IDX_W-1:0] fill_idx;
  assign fill_idx = fill_blk[IDX_W-1:0];

  always_comb begin
    mem_req  = (state == FILL) && (issued < (BEAT_W+1)'(BEATS));
    mem_addr = 15'({fill_blk, issued[BEAT_W-1:0]});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      issued <= '0;
      received <= '0;
      fill_blk <= '0;
      for (int i = 0; i < int'(BLOCKS); i++) valid[i] <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (!hit) begin
          state    <= FILL;
          fill_blk <= addr[XLEN-1:OFF_W];
          valid[idx] <= 1'b0;
          issued   <= '0;
          received <= '0;
        end
        FILL: begin
          if (mem_req) issued <= issued + 1'b1;
          if (mem_rvalid) begin
            received <= received + 1'b1;
            if (received == (BEAT_W+1)'(BEATS - 1)) begin
              state <= IDLE;
              valid[fill_idx] <= 1'b1;
              tags[fill_idx]  <= fill_blk[XLEN-OFF_W-1 -: TAG_W];
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // refill data path
  always_ff @(posedge clk) begin
    if (state == FILL && mem_rvalid) begin
      data[{fill_idx, received[BEAT_W-1:0], 1'b0}] <= mem_rdata[15:0];
      data[{fill_idx, received[BEAT_W-1:0], 1'b1}] <= mem_rdata[31:16];
    end
  end

  // the memory answers only requests this cache made during a refill
  property p_rvalid_in_fill;
    @(posedge clk) disable iff (rst) mem_rvalid |-> (state == FILL) && (received < issued);
  endproperty
  assert property (p_rvalid_in_fill);

endmodule
