// wisc_cpu_tb: self-checking testbench of the five-stage core.
//
// The core runs against ideal memories modelled here: a combinational
// instruction memory (optionally answering "miss" at random to exercise the
// fetch stall) and a data memory with a one-cycle registered read. Every
// program is also run on the instruction-set model of wisc_tb_pkg; the
// sequence of retired instruction addresses, the final registers, flags and
// data memory must match.
// Timing checks with an always-hitting instruction memory:
//   independent instructions retire one per cycle (CPI 1);
//   a dependent instruction right behind its producer waits 2 cycles;
//   LW followed by a use waits 2 cycles;
//   a taken branch or CALL costs 2 cycles, RET costs 4.
module wisc_cpu_tb;
  import wisc_pkg::*;
  import wisc_tb_pkg::*;

  logic  clk = 0, rst = 1;
  word_t imem_addr, imem_instr;
  logic  imem_hit;
  logic  dmem_re, dmem_we;
  word_t dmem_addr, dmem_wdata, dmem_rdata;
  word_t dbg_pc, dbg_ir, dbg_alu, dbg_retire_pc, dbg_wb_data;
  flags_t dbg_flags;
  logic  dbg_retire, dbg_wb_we;
  logic [3:0] dbg_wb_reg;
  logic  ev_stall, ev_flush, ev_ret, ev_fetch_miss, ev_ret_hold;

  int checks = 0, failures = 0;
  longint cycle = 0;

  wisc_cpu dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ideal memories
  logic [15:0] imem [65536];
  logic [15:0] dmem [65536];
  bit random_miss = 0;
  logic miss_now = 0;
  always @(posedge clk) miss_now <= random_miss && ($urandom_range(0, 3) == 0);
  assign imem_instr = imem[imem_addr];
  assign imem_hit   = !miss_now;
  always @(posedge clk) begin
    if (dmem_we) dmem[dmem_addr] <= dmem_wdata;
    if (dmem_re) dmem_rdata <= dmem[dmem_addr];
  end

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int unsigned  ret_pc [$];
  longint       ret_cyc [$];
  int unsigned  n_stall, n_flush, n_ret, n_miss;

  always @(posedge clk) if (!rst) begin
    if (dbg_retire) begin ret_pc.push_back(int'(dbg_retire_pc)); ret_cyc.push_back(cycle); end
    if (ev_stall) n_stall++;
    if (ev_flush) n_flush++;
    if (ev_ret) n_ret++;
    if (ev_fetch_miss) n_miss++;
  end

  // Runs prog on the core and on the model; compares everything.
  task automatic run_prog(input logic [15:0] prog [$], input string name);
    wisc_model m;
    int steps, k;
    bit done;
    int dm_bad;
    m = new();
    for (int i = 0; i < 65536; i++) begin
      logic [15:0] w;
      w = (i < prog.size()) ? prog[i] : 16'hF000;
      imem[i] = w; m.imem[i] = w;
      w = (i < prog.size()) ? prog[i] : 16'($urandom);
      dmem[i] = w; m.dmem[i] = w;
    end
    steps = m.run(200000);
    check(steps > 0, {name, ": model reaches halt"});
    ret_pc.delete(); ret_cyc.delete();
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    done = 0;
    for (int c = 0; c < 400000 && !done; c++) begin
      @(posedge clk);
      #1;
      if (ret_pc.size() > 0 && imem[ret_pc[$]] == HALT) done = 1;
    end
    check(done, {name, ": core reaches halt"});
    check(ret_pc.size() == m.trace.size(), $sformatf("%s: retired %0d, model executed %0d", name, ret_pc.size(), m.trace.size()));
    k = 0;
    for (int i = 0; i < ret_pc.size() && i < m.trace.size(); i++)
      if (ret_pc[i] != m.trace[i]) begin
        if (k == 0) $display("%s: retire %0d at %h, model %h", name, i, ret_pc[i], m.trace[i]);
        k++;
      end
    check(k == 0, {name, ": retired instruction sequence"});
    repeat (3) @(posedge clk);
    for (int i = 0; i < 16; i++)
      check(dut.u_rf.regs[i] == m.r[i], $sformatf("%s: r%0d = %h, model %h", name, i, dut.u_rf.regs[i], m.r[i]));
    check(dbg_flags == {m.z, m.v, m.n}, $sformatf("%s: flags %b, model %b", name, dbg_flags, {m.z, m.v, m.n}));
    dm_bad = 0;
    for (int i = 0; i < 65536; i++) if (dmem[i] != m.dmem[i]) dm_bad++;
    check(dm_bad == 0, $sformatf("%s: %0d data words differ", name, dm_bad));
  endtask

  function automatic longint gap(int unsigned pc_a, int unsigned pc_b);
    int ia = -1, ib = -1;
    foreach (ret_pc[i]) begin
      if (ret_pc[i] == pc_a && ia < 0) ia = i;
      if (ret_pc[i] == pc_b && ib < 0) ib = i;
    end
    if (ia < 0 || ib < 0) return -1;
    return ret_cyc[ib] - ret_cyc[ia];
  endfunction

  logic [15:0] p [$];

  initial begin
    // ---- 1: independent instructions, CPI 1
    p = {e_llb(1, 5), e_llb(2, 7), e_lhb(3, 1), e_inc(4, 0, 3), e_xor(5, 0, 0),
         e_sll(6, 0, 2), e_srl(7, 0, 1), e_llb(8, 8), HALT};
    run_prog(p, "straight");
    check(gap(0, 8) == 8, $sformatf("straight: 8 instructions in %0d cycles", gap(0, 8)));

    // ---- 2: RAW hazard on the next instruction, and two apart
    p = {e_llb(1, 5), e_add(2, 1, 1), e_llb(3, 1), e_llb(9, 2), e_add(4, 3, 3), HALT};
    run_prog(p, "raw");
    check(gap(0, 1) == 3, $sformatf("raw: dependent at distance 1 retires %0d cycles later", gap(0, 1)));
    check(gap(3, 4) == 2, $sformatf("raw: dependent at distance 2 retires %0d cycles after its neighbour", gap(3, 4)));

    // ---- 3: load-use, store-load, taken / not-taken branch
    p = {e_lhb(14, 8'h80), e_llb(14, 0), e_llb(1, 8'h5A), e_sw(1, 3), e_lw(2, 3),
         e_add(3, 2, 2), e_sub(4, 3, 3), e_b(0, 2), e_llb(5, 1), e_llb(5, 2), e_llb(6, 3),
         e_b(4, 1), e_llb(7, 4), HALT};
    run_prog(p, "mem_branch");
    check(gap(4, 5) == 3, $sformatf("mem_branch: load-use gap %0d", gap(4, 5)));
    check(gap(7, 10) == 3, $sformatf("mem_branch: taken branch gap %0d", gap(7, 10)));
    check(gap(11, 12) == 1, $sformatf("mem_branch: untaken branch gap %0d", gap(11, 12)));

    // ---- 4: CALL / RET, nested, and every branch condition
    p.delete();
    p = {e_llb(1, 3), e_call(16), e_llb(2, 9), HALT};
    while (p.size() < 16) p.push_back(16'hF000);
    // 16: function A: calls B, then returns
    p.push_back(e_inc(3, 1, 1));        // 16
    p.push_back(e_call(32));            // 17
    p.push_back(e_add(4, 3, 1));        // 18
    p.push_back(e_ret());               // 19
    while (p.size() < 32) p.push_back(16'hF000);
    // 32: function B
    p.push_back(e_sub(5, 1, 3));        // 32: 3 - 4 = -1 : N=1
    for (int c = 0; c < 8; c++) begin p.push_back(e_b(c, 1)); p.push_back(e_inc(6, 6, 1)); end
    p.push_back(e_ret());
    run_prog(p, "call_ret");
    check(gap(17, 32) == 3, $sformatf("call_ret: CALL gap %0d", gap(17, 32)));
    check(gap(19, 2) == 5, $sformatf("call_ret: RET gap %0d", gap(19, 2)));
    check(n_ret == 2, $sformatf("call_ret: %0d returns", n_ret));

    // ---- 5: random programs, with and without fetch misses
    for (int r = 0; r < 40; r++) begin
      random_miss = r[0];
      gen_random(p, 150);
      run_prog(p, $sformatf("random%0d", r));
    end
    check(n_stall > 0, "stalls happened");
    check(n_flush > 0, "flushes happened");
    check(n_miss > 0, "fetch misses happened");
    $display("events: stall=%0d flush=%0d ret=%0d miss=%0d", n_stall, n_flush, n_ret, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
