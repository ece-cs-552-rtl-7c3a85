// wisc_f07: the WISC-F07 processor system.
//
// Connects the five-stage core (wisc_cpu) to its memory system:
//   - a 64-word direct-mapped instruction cache (8 blocks of 8 words),
//     refilled from main memory over a 2-word (32-bit) bus;
//   - main memory, 64K 16-bit words, read by the instruction cache;
//   - the data cache, as big as main memory and always hitting, used by
//     LW, SW, CALL and RET.
// Instructions and data share one 16-bit word address space. The program
// image is placed through the load port (load_we/load_addr/load_data),
// which writes the word into both main memory and the data cache, so the
// two start as copies of the same memory; afterwards stores change only the
// data cache and the instruction cache is never written, as in the
// specification. Load the image while reset is high, then drop reset: the
// processor starts at address 0 with SP = FFFF.
// Interface: clk, reset (synchronous, active high), the load port, and
// observation outputs (fetch PC, IR, ALU output, FLAG register, writeback
// and retirement, pipeline event strobes). The memory sizes, cache
// organisation and bus width are the specification's; the memory latency
// (MEM_LATENCY) and the load port are this design's.
module wisc_f07
  import wisc_pkg::*;
#(
  parameter int unsigned MEM_ADDR_W   = 16,  // 64K-word main memory and data cache
  parameter int unsigned ICACHE_WORDS = 64,
  parameter int unsigned ICACHE_BLOCKS = 8,
  parameter int unsigned MEM_LATENCY  = 4
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        load_we,
  input  logic [MEM_ADDR_W-1:0] load_addr,
  input  word_t       load_data,
  output word_t       dbg_pc,
  output word_t       dbg_ir,
  output word_t       dbg_alu,
  output flags_t      dbg_flags,
  output logic        dbg_retire,
  output word_t       dbg_retire_pc,
  output logic        dbg_wb_we,
  output logic [3:0]  dbg_wb_reg,
  output word_t       dbg_wb_data,
  output logic        ev_stall,
  output logic        ev_flush,
  output logic        ev_ret,
  output logic        ev_fetch_miss,
  output logic        ev_ret_hold
);

  word_t       imem_addr, imem_instr;
  logic        imem_hit;
  logic        dmem_re, dmem_we;
  word_t       dmem_addr, dmem_wdata, dmem_rdata;
  logic        mm_req, mm_rvalid;
  logic [14:0] mm_addr;
  logic [31:0] mm_rdata;

  wisc_cpu u_cpu (
    .clk, .rst(reset),
    .imem_addr, .imem_instr, .imem_hit,
    .dmem_re, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .dbg_pc, .dbg_ir, .dbg_alu, .dbg_flags, .dbg_retire, .dbg_retire_pc,
    .dbg_wb_we, .dbg_wb_reg, .dbg_wb_data,
    .ev_stall, .ev_flush, .ev_ret, .ev_fetch_miss, .ev_ret_hold
  );

  icache #(.WORDS(ICACHE_WORDS), .BLOCKS(ICACHE_BLOCKS)) u_icache (
    .clk, .rst(reset),
    .addr(imem_addr), .instr(imem_instr), .hit(imem_hit),
    .mem_req(mm_req), .mem_addr(mm_addr), .mem_rdata(mm_rdata), .mem_rvalid(mm_rvalid)
  );

  main_memory #(.ADDR_W(MEM_ADDR_W), .LATENCY(MEM_LATENCY)) u_mm (
    .clk, .rst(reset),
    .req(mm_req), .req_addr(mm_addr[MEM_ADDR_W-2:0]),
    .rdata(mm_rdata), .rvalid(mm_rvalid),
    .load_we, .load_addr, .load_data
  );

  data_cache #(.ADDR_W(MEM_ADDR_W)) u_dcache (
    .clk,
    .re(dmem_re), .we(dmem_we),
    .addr(dmem_addr[MEM_ADDR_W-1:0]), .wdata(dmem_wdata), .rdata(dmem_rdata),
    .load_we, .load_addr, .load_data
  );

endmodule
