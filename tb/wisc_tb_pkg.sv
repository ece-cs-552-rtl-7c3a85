// wisc_tb_pkg: verification helpers for the WISC-F07 testbenches.
//
// - Instruction encoders (a tiny assembler) for every WISC-F07 instruction.
// - wisc_model: an instruction-set reference model written from the
//   instruction definitions alone (integer arithmetic for the flags, no
//   pipeline). It runs a program to the halt idiom "B true, -1" (a branch
//   to itself) and records the address of every executed instruction, the
//   final registers, flags and data memory. Instruction fetch reads the
//   program image only, data accesses read and write a separate copy, as in
//   the processor, where stores never reach the instruction cache.
// - gen_random: a random program of arithmetic, shifts, LHB/LLB, LW/SW,
//   forward conditional branches and calls of two leaf subroutines, ending
//   in the halt idiom.
package wisc_tb_pkg;

  localparam logic [15:0] HALT = 16'hC7FF;   // B true, -1

  // ---------------------------------------------------------------- encoders
  function automatic logic [15:0] e_rrr(input logic [3:0] op, input int d, s, t);
    return {op, 4'(d), 4'(s), 4'(t)};
  endfunction
  function automatic logic [15:0] e_add (input int d, s, t); return e_rrr(4'h0, d, s, t); endfunction
  function automatic logic [15:0] e_sub (input int d, s, t); return e_rrr(4'h1, d, s, t); endfunction
  function automatic logic [15:0] e_nand(input int d, s, t); return e_rrr(4'h2, d, s, t); endfunction
  function automatic logic [15:0] e_xor (input int d, s, t); return e_rrr(4'h3, d, s, t); endfunction
  function automatic logic [15:0] e_inc (input int d, s, imm); return e_rrr(4'h4, d, s, imm & 15); endfunction
  function automatic logic [15:0] e_sra (input int d, s, imm); return e_rrr(4'h5, d, s, imm); endfunction
  function automatic logic [15:0] e_srl (input int d, s, imm); return e_rrr(4'h6, d, s, imm); endfunction
  function automatic logic [15:0] e_sll (input int d, s, imm); return e_rrr(4'h7, d, s, imm); endfunction
  function automatic logic [15:0] e_lw  (input int t, off); return {4'h8, 4'(t), 8'(off)}; endfunction
  function automatic logic [15:0] e_sw  (input int t, off); return {4'h9, 4'(t), 8'(off)}; endfunction
  function automatic logic [15:0] e_lhb (input int t, imm); return {4'hA, 4'(t), 8'(imm)}; endfunction
  function automatic logic [15:0] e_llb (input int t, imm); return {4'hB, 4'(t), 8'(imm)}; endfunction
  function automatic logic [15:0] e_b   (input int cond, off); return {4'hC, 1'b0, 3'(cond), 8'(off)}; endfunction
  function automatic logic [15:0] e_call(input int target); return {4'hD, 12'(target)}; endfunction
  function automatic logic [15:0] e_ret (); return 16'hE000; endfunction

  // ---------------------------------------------------------------- model
  class wisc_model;
    logic [15:0] imem [65536];
    logic [15:0] dmem [65536];
    logic [15:0] r [16];
    bit z, v, n;
    logic [15:0] pc;
    int unsigned trace [$];
    int unsigned taken_by_cond [8];
    int unsigned calls, rets;

    function new();
      for (int i = 0; i < 16; i++) r[i] = 16'h0;
      r[15] = 16'hFFFF;
      pc = 0; z = 0; v = 0; n = 0;
      calls = 0; rets = 0;
      foreach (taken_by_cond[i]) taken_by_cond[i] = 0;
    endfunction

    function automatic bit cond_ok(int c);
      case (c)
        0: return z;
        1: return n && !v;
        2: return !z && !n && !v;
        3: return v;
        4: return !z;
        5: return !(n && !v);
        6: return (n && !v) || z;
        default: return 1;
      endcase
    endfunction

    // signed add with overflow detection by integer range
    function automatic logic [15:0] add_flags(logic [15:0] a, logic [15:0] b, bit sub);
      int sa, sb, res;
      sa = int'($signed(a));
      sb = int'($signed(b));
      res = sub ? sa - sb : sa + sb;
      v = (res > 32767) || (res < -32768);
      add_flags = res[15:0];
      z = (add_flags == 0);
      n = add_flags[15];
    endfunction

    // executes one instruction; returns 1 when the instruction was the halt
    function automatic bit step();
      logic [15:0] ins, pc1, a, b, res;
      int d, s, t;
      ins = imem[pc];
      trace.push_back(int'(pc));
      pc1 = pc + 1;
      d = int'(ins[11:8]); s = int'(ins[7:4]); t = int'(ins[3:0]);
      if (ins == HALT) return 1;
      a = r[s]; b = r[t];
      pc = pc1;
      case (ins[15:12])
        4'h0: r[d] = add_flags(a, b, 0);
        4'h1: r[d] = add_flags(a, b, 1);
        4'h2: begin res = ~(a & b); z = (res == 0); v = 0; n = 0; r[d] = res; end
        4'h3: begin res = a ^ b;    z = (res == 0); v = 0; n = 0; r[d] = res; end
        4'h4: r[d] = add_flags(a, {{12{ins[3]}}, ins[3:0]}, 0);
        4'h5: r[d] = 16'($signed(a) >>> t);
        4'h6: r[d] = a >> t;
        4'h7: r[d] = a << t;
        4'h8: r[d] = dmem[16'(r[14] + {{8{ins[7]}}, ins[7:0]})];
        4'h9: dmem[16'(r[14] + {{8{ins[7]}}, ins[7:0]})] = r[d];
        4'hA: r[d] = {ins[7:0], r[d][7:0]};
        4'hB: r[d] = {r[d][15:8], ins[7:0]};
        4'hC: if (cond_ok(int'(ins[10:8]))) begin
                pc = pc1 + {{8{ins[7]}}, ins[7:0]};
                taken_by_cond[ins[10:8]]++;
              end
        4'hD: begin dmem[r[15]] = pc1; r[15] = r[15] - 1; pc = {pc1[15:12], ins[11:0]}; calls++; end
        4'hE: begin r[15] = r[15] + 1; pc = dmem[r[15]]; rets++; end
        default: ;
      endcase
      return 0;
    endfunction

    function automatic int run(int max_steps);
      for (int i = 0; i < max_steps; i++) if (step()) return i + 1;
      return -1;
    endfunction
  endclass

  // ---------------------------------------------------------------- random program
  // Fills prog with len random instructions, the halt, and two leaf
  // subroutines (random arithmetic that leaves $15 alone, then RET) that the
  // body calls now and then. Branches only go forward and stay inside the
  // body, so the program ends. The program must stay within one 4K-word page.
  function automatic void gen_random(ref logic [15:0] prog [$], input int len);
    int kind, off, sub0, sub1, n0, n1;
    n0 = $urandom_range(1, 6);
    n1 = $urandom_range(1, 6);
    sub0 = len + 1;
    sub1 = sub0 + n0 + 1;
    prog.delete();
    for (int i = 0; i < len; i++) begin
      kind = $urandom_range(0, 16);
      if (kind == 12) begin
        off = $urandom_range(0, (len - 1 - i) > 6 ? 6 : (len - 1 - i));
        prog.push_back(e_b($urandom_range(0, 7), off));
      end else if (kind == 13) begin
        prog.push_back(e_call($urandom_range(0, 1) ? sub1 : sub0));
      end else if (kind >= 14) begin
        // extra weight on arithmetic that sets the flags
        prog.push_back(e_rrr(4'($urandom_range(0, 4)), $urandom_range(0, 15),
                             $urandom_range(0, 15), $urandom_range(0, 15)));
      end else begin
        prog.push_back({4'(kind), 12'($urandom)});
      end
    end
    prog.push_back(HALT);
    for (int i = 0; i < n0 + n1; i++) begin
      prog.push_back(e_rrr(4'($urandom_range(0, 7)), $urandom_range(0, 14),
                           $urandom_range(0, 15), $urandom_range(0, 15)));
      if (i == n0 - 1 || i == n0 + n1 - 1) prog.push_back(e_ret());
    end
  endfunction

endpackage
