// wisc_cpu: the WISC-F07 five-stage pipelined processor core.
//
// Stages and what happens in each:
//   IF   the PC addresses the instruction cache; on a hit the word enters
//        IF/ID and the PC advances by one, on a miss a bubble enters ID and
//        the PC holds until the cache has refilled.
//   ID   the decoder builds the control word and the register file is read
//        (write-through, so the value written back in the same cycle is
//        seen). The hazard unit stalls ID while an older instruction in EX
//        or MEM is still to write a register ID reads; there is no
//        forwarding, so a dependent instruction waits up to two cycles.
//   EX   the ALU computes the result or the data address (DS + offset for
//        LW/SW, SP - 1 for CALL, SP + 1 for RET), the FLAG register is
//        written, and branches and CALL are resolved: when taken the two
//        younger instructions in IF and ID are discarded (two-cycle
//        penalty) and the PC is loaded with the target.
//   MEM  the data cache is accessed: LW and RET read, SW and CALL write
//        (CALL stores PC+1 at the address held in SP).
//   WB   the register file is written (from memory for LW, from the ALU
//        otherwise); a RET loads the PC with the word it read. Fetching
//        stops while a RET is in ID, EX or MEM, so nothing follows it down
//        the pipe.
// Branch targets are PC+1 plus the sign-extended 8-bit offset; CALL targets
// keep the top four bits of PC+1 and take the low twelve from the
// instruction. Reset (synchronous, active high, one cycle is enough) clears
// the PC to 0 and sets SP to FFFF, as the specification asks, and empties
// the pipeline.
// The instruction set, the five stages and the lack of forwarding follow
// the specification; stage placement of each operation, predict-not-taken
// fetch with flushing, and the RET fetch hold are this design's choices.
// The dbg_* and ev_* outputs expose the PC, IR, ALU output, writeback and
// pipeline events for observation; they do not affect execution.
module wisc_cpu
  import wisc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  // instruction cache
  output word_t imem_addr,
  input  word_t imem_instr,
  input  logic  imem_hit,
  // data cache
  output logic  dmem_re,
  output logic  dmem_we,
  output word_t dmem_addr,
  output word_t dmem_wdata,
  input  word_t dmem_rdata,
  // observation
  output word_t dbg_pc,          // fetch PC
  output word_t dbg_ir,          // instruction in ID
  output word_t dbg_alu,         // ALU output in EX
  output flags_t dbg_flags,      // FLAG register
  output logic  dbg_retire,      // an instruction completes WB this cycle
  output word_t dbg_retire_pc,   // its address
  output logic  dbg_wb_we,
  output logic [3:0] dbg_wb_reg,
  output word_t dbg_wb_data,
  output logic  ev_stall,        // data-hazard stall in ID
  output logic  ev_flush,        // taken branch or CALL discards IF/ID and ID/EX
  output logic  ev_ret,          // RET loads the PC in WB
  output logic  ev_fetch_miss,   // fetch waits for the instruction cache
  output logic  ev_ret_hold      // fetch held behind a RET
);

  // ------------------------------------------------------------------ IF
  word_t pc;

  typedef struct packed {
    logic  valid;
    word_t pc;
    word_t instr;
  } ifid_t;

  typedef struct packed {
    logic  valid;
    word_t pc;
    ctrl_t ctrl;
    word_t a;
    word_t b;        // port B register value
    word_t instr;
  } idex_t;

  typedef struct packed {
    logic  valid;
    word_t pc;
    ctrl_t ctrl;
    word_t y;        // ALU result
  } exmem_t;

  typedef struct packed {
    logic  valid;
    word_t pc;
    ctrl_t ctrl;
    word_t y;
  } memwb_t;

  ifid_t  ifid;
  idex_t  idex;
  exmem_t exmem;
  memwb_t memwb;

  // ------------------------------------------------------------------ ID
  ctrl_t id_ctrl;
  word_t rf_a, rf_b;
  logic  stall, hold_fetch;

  decoder u_dec (.instr(ifid.instr), .ctrl(id_ctrl));

  logic  wb_we;
  word_t wb_data;

  regfile u_rf (
    .clk, .rst,
    .ra_addr(id_ctrl.src_a), .ra_data(rf_a),
    .rb_addr(id_ctrl.src_b), .rb_data(rf_b),
    .we(wb_we), .wa(memwb.ctrl.dest), .wd(wb_data)
  );

  hazard_unit u_hz (
    .id_valid(ifid.valid),
    .id_use_a(id_ctrl.use_a), .id_src_a(id_ctrl.src_a),
    .id_use_b(id_ctrl.use_b), .id_src_b(id_ctrl.src_b),
    .id_is_ret(id_ctrl.is_ret),
    .ex_valid(idex.valid), .ex_reg_we(idex.ctrl.reg_we),
    .ex_dest(idex.ctrl.dest), .ex_is_ret(idex.ctrl.is_ret),
    .mem_valid(exmem.valid), .mem_reg_we(exmem.ctrl.reg_we),
    .mem_dest(exmem.ctrl.dest), .mem_is_ret(exmem.ctrl.is_ret),
    .stall, .hold_fetch
  );

  // ------------------------------------------------------------------ EX
  word_t  alu_b, alu_y, ex_pc1, br_target, call_target;
  flags_t alu_flags, flags;
  logic   cond_true, ex_taken;

  always_comb begin
    unique case (idex.ctrl.b_sel)
      B_REG:   alu_b = idex.b;
      B_SIMM4: alu_b = {{12{idex.instr[3]}}, idex.instr[3:0]};
      B_UIMM4: alu_b = {12'd0, idex.instr[3:0]};
      B_IMM8:  alu_b = {8'd0, idex.instr[7:0]};
      B_SIMM8: alu_b = {{8{idex.instr[7]}}, idex.instr[7:0]};
      B_ONE:   alu_b = 16'd1;
      default: alu_b = idex.b;
    endcase
  end

  alu u_alu (.op(idex.ctrl.alu_op), .a(idex.a), .b(alu_b), .y(alu_y), .flags(alu_flags));

  flag_unit u_flags (
    .clk, .rst,
    .we(idex.valid && idex.ctrl.flag_we),
    .flags_in(alu_flags), .flags,
    .cond(idex.instr[10:8]), .cond_true
  );

  always_comb begin
    ex_pc1      = idex.pc + 16'd1;
    br_target   = ex_pc1 + {{8{idex.instr[7]}}, idex.instr[7:0]};
    call_target = {ex_pc1[15:12], idex.instr[11:0]};
    ex_taken    = idex.valid && ((idex.ctrl.is_branch && cond_true) || idex.ctrl.is_call);
  end

  // ------------------------------------------------------------------ MEM
  // EX/MEM also carries the memory address and store data
  word_t exmem_addr, exmem_wdata;

  // no memory access while reset is held: the pipeline registers only
  // become empty at the first reset edge
  assign dmem_re    = exmem.valid && exmem.ctrl.mem_rd && !rst;
  assign dmem_we    = exmem.valid && exmem.ctrl.mem_wr && !rst;
  assign dmem_addr  = exmem_addr;
  assign dmem_wdata = exmem_wdata;

  // ------------------------------------------------------------------ WB
  logic ret_redirect;
  always_comb begin
    wb_we        = memwb.valid && memwb.ctrl.reg_we;
    wb_data      = memwb.ctrl.wb_mem ? dmem_rdata : memwb.y;
    ret_redirect = memwb.valid && memwb.ctrl.is_ret;
  end

  // ------------------------------------------------------------------ pipeline registers
  assign imem_addr = pc;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc    <= '0;
      ifid  <= '0;
      idex  <= '0;
      exmem <= '0;
      memwb <= '0;
      exmem_addr  <= '0;
      exmem_wdata <= '0;
    end else begin
      // PC and IF/ID
      if (ret_redirect) begin
        pc   <= dmem_rdata;
        ifid <= '0;
      end else if (ex_taken) begin
        pc   <= idex.ctrl.is_call ? call_target : br_target;
        ifid <= '0;
      end else if (stall) begin
        // hold PC and IF/ID
      end else if (hold_fetch || !imem_hit) begin
        ifid <= '0;
      end else begin
        pc   <= pc + 16'd1;
        ifid <= '{valid: 1'b1, pc: pc, instr: imem_instr};
      end

      // ID/EX
      if (ex_taken || stall || !ifid.valid) begin
        idex <= '0;
      end else begin
        idex <= '{valid: 1'b1, pc: ifid.pc, ctrl: id_ctrl, a: rf_a, b: rf_b, instr: ifid.instr};
      end

      // EX/MEM
      exmem <= '{valid: idex.valid, pc: idex.pc, ctrl: idex.ctrl, y: alu_y};
      exmem_addr  <= idex.ctrl.is_call ? idex.a : alu_y;
      exmem_wdata <= idex.ctrl.is_call ? ex_pc1 : idex.b;

      // MEM/WB
      memwb <= '{valid: exmem.valid, pc: exmem.pc, ctrl: exmem.ctrl, y: exmem.y};
    end
  end

  // ------------------------------------------------------------------ observation
  assign dbg_pc        = pc;
  assign dbg_ir        = ifid.instr;
  assign dbg_alu       = alu_y;
  assign dbg_flags     = flags;
  assign dbg_retire    = memwb.valid;
  assign dbg_retire_pc = memwb.pc;
  assign dbg_wb_we     = wb_we;
  assign dbg_wb_reg    = memwb.ctrl.dest;
  assign dbg_wb_data   = wb_data;
  assign ev_stall      = stall;
  assign ev_flush      = ex_taken;
  assign ev_ret        = ret_redirect;
  assign ev_fetch_miss = !imem_hit && !stall && !hold_fetch && !ex_taken && !ret_redirect;
  assign ev_ret_hold   = hold_fetch && !stall && !ex_taken;

  // a RET never shares the pipeline with a younger instruction
  property p_ret_alone;
    @(posedge clk) disable iff (rst) ret_redirect |-> !idex.valid && !exmem.valid && !ifid.valid;
  endproperty
  assert property (p_ret_alone);

endmodule
