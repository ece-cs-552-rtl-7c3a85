// hazard_unit: pipeline interlock for WISC-F07.
//
// The pipeline has no forwarding, so an instruction in decode (ID) may not
// read a register that an older instruction still in execute (EX) or memory
// (MEM) is going to write; the register file's write-through already covers
// the instruction in writeback. While such a read-after-write hazard exists
// `stall` is high: the PC and the IF/ID register hold and a bubble enters EX.
//
// RET takes its new PC from memory, which is known only in writeback. While
// a RET is in ID, EX or MEM, `hold_fetch` is high: the PC holds and bubbles
// enter ID, so no instruction behind a RET is in the pipeline when it
// redirects the fetch.
//
// Combinational. Stalling rather than forwarding follows the specification
// ("need not implement data forwarding"); stopping the fetch behind RET is
// this design's choice.
module hazard_unit (
  input  logic       id_valid,
  input  logic       id_use_a,
  input  logic [3:0] id_src_a,
  input  logic       id_use_b,
  input  logic [3:0] id_src_b,
  input  logic       id_is_ret,
  input  logic       ex_valid,
  input  logic       ex_reg_we,
  input  logic [3:0] ex_dest,
  input  logic       ex_is_ret,
  input  logic       mem_valid,
  input  logic       mem_reg_we,
  input  logic [3:0] mem_dest,
  input  logic       mem_is_ret,
  output logic       stall,
  output logic       hold_fetch
);

  logic ex_w, mem_w;

  always_comb begin
    ex_w  = ex_valid && ex_reg_we;
    mem_w = mem_valid && mem_reg_we;
    stall = id_valid && (
              (id_use_a && ((ex_w && ex_dest == id_src_a) || (mem_w && mem_dest == id_src_a))) ||
              (id_use_b && ((ex_w && ex_dest == id_src_b) || (mem_w && mem_dest == id_src_b))));
    hold_fetch = (id_valid && id_is_ret) || (ex_valid && ex_is_ret) || (mem_valid && mem_is_ret);
  end

endmodule
