// wisc_f07_tb: end-to-end testbench of the WISC-F07 system at its default
// sizes (64K-word main memory and data cache, 64-word instruction cache,
// memory latency 4).
//
// Each program is written through the load port while reset is high (the
// rest of memory gets random data), then run to the halt idiom
// "B true, -1". The instruction-set model of wisc_tb_pkg runs the same
// image; the retired instruction addresses, final registers, flags and all
// 64K data words must match.
// Programs: a directed one with a loop, load/store, a load-use stall,
// nested CALL/RET into routines whose blocks conflict in the instruction
// cache, and conditional branches; then 20 random programs (with calls of
// leaf subroutines) long enough to sweep the cache many times.
// Timing checks: a fetch that misses in the instruction cache reaches
// writeback MEM_LATENCY + 5 cycles later than a hit would (checked on a CALL
// into an uncached block), and a loop that
// fits in the cache runs without refills after its first pass.
// Every mechanism is counted and must occur: data-hazard stall, branch/CALL
// flush, RET redirect, fetch hold behind RET, cache miss, refill that
// evicts a valid block, cache hit, load, store, flag write.
module wisc_f07_tb;
  import wisc_pkg::*;
  import wisc_tb_pkg::*;

  localparam int unsigned LAT = 4;   // the top's default MEM_LATENCY

  logic        clk = 0, reset = 1;
  logic        load_we = 0;
  logic [15:0] load_addr = '0;
  word_t       load_data = '0;
  word_t       dbg_pc, dbg_ir, dbg_alu, dbg_retire_pc, dbg_wb_data;
  flags_t      dbg_flags;
  logic        dbg_retire, dbg_wb_we;
  logic [3:0]  dbg_wb_reg;
  logic        ev_stall, ev_flush, ev_ret, ev_fetch_miss, ev_ret_hold;

  int checks = 0, failures = 0;
  longint cycle = 0;

  wisc_f07 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (8_000_000) @(posedge clk);
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

  // ---------------------------------------------------------------- event counters
  int unsigned  ret_pc [$];
  longint       ret_cyc [$];
  int unsigned  n_stall, n_flush, n_ret, n_hold, n_miss, n_fill, n_evict, n_hit;
  int unsigned  n_load, n_store, n_flagw;

  always @(posedge clk) if (!reset) begin
    if (dbg_retire) begin ret_pc.push_back(int'(dbg_retire_pc)); ret_cyc.push_back(cycle); end
    if (ev_stall) n_stall++;
    if (ev_flush) n_flush++;
    if (ev_ret) n_ret++;
    if (ev_ret_hold) n_hold++;
    if (ev_fetch_miss) n_miss++;
    if (dut.u_icache.hit) n_hit++;
    if (dut.u_icache.state == 1'b0 && !dut.u_icache.hit) begin
      n_fill++;
      if (dut.u_icache.valid[dut.u_icache.idx]) n_evict++;
    end
    if (dut.dmem_re && !dut.u_cpu.exmem.ctrl.is_ret) n_load++;
    if (dut.dmem_we && !dut.u_cpu.exmem.ctrl.is_call) n_store++;
    if (dut.u_cpu.idex.valid && dut.u_cpu.idex.ctrl.flag_we) n_flagw++;
  end

  int unsigned fills_at_start;

  task automatic run_prog(input logic [15:0] prog [$], input string name);
    wisc_model m;
    int steps, k, dm_bad;
    bit done;
    m = new();
    reset = 1;
    @(negedge clk);
    for (int i = 0; i < 65536; i++) begin
      logic [15:0] w;
      w = (i < prog.size()) ? prog[i] : 16'($urandom);
      m.imem[i] = w; m.dmem[i] = w;
      load_we = 1; load_addr = 16'(i); load_data = w;
      @(negedge clk);
    end
    load_we = 0;
    steps = m.run(500000);
    check(steps > 0, {name, ": model reaches halt"});
    ret_pc.delete(); ret_cyc.delete();
    fills_at_start = n_fill;
    @(negedge clk);
    reset = 0;
    done = 0;
    for (int c = 0; c < 2_000_000 && !done; c++) begin
      @(negedge clk);
      if (ret_pc.size() > 0 && m.imem[ret_pc[$]] == HALT) done = 1;
    end
    check(done, {name, ": processor reaches halt"});
    check(ret_pc.size() == m.trace.size(),
          $sformatf("%s: retired %0d, model executed %0d", name, ret_pc.size(), m.trace.size()));
    k = 0;
    for (int i = 0; i < ret_pc.size() && i < m.trace.size(); i++)
      if (ret_pc[i] != m.trace[i]) begin
        if (k == 0) $display("%s: retire %0d at %h, model %h", name, i, ret_pc[i], m.trace[i]);
        k++;
      end
    check(k == 0, {name, ": retired instruction sequence"});
    repeat (3) @(negedge clk);
    for (int i = 0; i < 16; i++)
      check(dut.u_cpu.u_rf.regs[i] == m.r[i],
            $sformatf("%s: r%0d = %h, model %h", name, i, dut.u_cpu.u_rf.regs[i], m.r[i]));
    check(dbg_flags == {m.z, m.v, m.n}, $sformatf("%s: flags", name));
    dm_bad = 0;
    for (int i = 0; i < 65536; i++) if (dut.u_dcache.mem[i] != m.dmem[i]) dm_bad++;
    check(dm_bad == 0, $sformatf("%s: %0d data words differ", name, dm_bad));
  endtask

  function automatic longint gap_at(int ia, int ib);
    if (ia < 0 || ib < 0 || ia >= ret_cyc.size() || ib >= ret_cyc.size()) return -1;
    return ret_cyc[ib] - ret_cyc[ia];
  endfunction

  function automatic int first_idx(int unsigned pc);
    foreach (ret_pc[i]) if (ret_pc[i] == pc) return i;
    return -1;
  endfunction

  logic [15:0] p [$];
  int i4;

  initial begin
    // ---- directed program
    p = {e_llb(1, 12),            // 0  loop counter
         e_llb(2, 0),             // 1
         e_lhb(14, 8'h40),        // 2  DS = 0x40xx
         e_llb(14, 8'h00),        // 3  DS = 0x4000
         e_add(2, 2, 1),          // 4  loop: r2 += r1
         e_inc(1, 1, -1),         // 5  r1--, sets flags
         e_b(4, -3),              // 6  B NE loop
         e_sw(2, 1),              // 7
         e_lw(3, 1),              // 8  block 1: miss
         e_add(4, 3, 3),          // 9  load-use stall
         e_call(16'h040),         // 10 routine in a block that conflicts with block 0
         e_call(16'h040),         // 11 again: its block was evicted by the nested routine
         e_sub(7, 4, 2),          // 12
         e_b(1, 1),               // 13 B LT
         e_inc(8, 8, 1),          // 14
         HALT};                   // 15
    while (p.size() < 16'h40) p.push_back(16'hF000);
    p.push_back(e_xor(5, 4, 2));   // 0x40
    p.push_back(e_nand(6, 4, 4));  // 0x41
    p.push_back(e_call(16'h080));  // 0x42 nested call, same cache index
    p.push_back(e_sra(9, 6, 3));   // 0x43
    p.push_back(e_ret());          // 0x44
    while (p.size() < 16'h80) p.push_back(16'hF000);
    p.push_back(e_sll(10, 4, 2));  // 0x80
    p.push_back(e_srl(11, 4, 1));  // 0x81
    p.push_back(e_b(3, 0));        // 0x82 B OVF
    p.push_back(e_ret());          // 0x83
    run_prog(p, "directed");
    // miss penalty: the first CALL goes to a block not yet cached; a taken
    // CALL alone costs 2 cycles, the refill adds LAT + 5
    check(gap_at(first_idx(10), first_idx(16'h40)) == LAT + 8,
          $sformatf("CALL into a missing block: gap %0d, expected %0d",
                    gap_at(first_idx(10), first_idx(16'h40)), LAT + 8));
    // the loop body (4..6) is in block 0: later iterations retire every 3 cycles
    // plus the 2-cycle taken-branch penalty and no refill
    i4 = first_idx(4);
    check(i4 >= 0 && gap_at(i4 + 3, i4 + 6) == 5,
          $sformatf("cached loop iteration: %0d cycles", gap_at(i4 + 3, i4 + 6)));
    check(n_ret == 4, $sformatf("directed: %0d returns", n_ret));

    // ---- random programs
    for (int r = 0; r < 20; r++) begin
      gen_random(p, 400);
      run_prog(p, $sformatf("random%0d", r));
    end

    check(n_stall > 0, "data-hazard stall occurred");
    check(n_flush > 0, "branch/CALL flush occurred");
    check(n_ret > 0,   "RET redirect occurred");
    check(n_hold > 0,  "fetch hold behind RET occurred");
    check(n_miss > 0,  "instruction cache miss occurred");
    check(n_evict > 0, "refill evicting a valid block occurred");
    check(n_hit > 0,   "instruction cache hit occurred");
    check(n_load > 0 && n_store > 0, "loads and stores occurred");
    check(n_flagw > 0, "flag writes occurred");
    $display("events: stall=%0d flush=%0d ret=%0d hold=%0d miss_cycles=%0d fills=%0d evictions=%0d hits=%0d loads=%0d stores=%0d flagw=%0d",
             n_stall, n_flush, n_ret, n_hold, n_miss, n_fill, n_evict, n_hit, n_load, n_store, n_flagw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
