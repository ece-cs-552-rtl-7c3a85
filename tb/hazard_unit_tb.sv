// hazard_unit_tb: self-checking testbench of the interlock.
// Random pipeline states; the expected stall is computed here by looking, for
// each register the ID instruction needs, for a valid register-writing
// instruction in EX or MEM with that destination. Directed cases check that
// a writer in WB (not an input) never stalls, and the RET fetch hold.
module hazard_unit_tb;
  logic id_valid, id_use_a, id_use_b, id_is_ret;
  logic [3:0] id_src_a, id_src_b, ex_dest, mem_dest;
  logic ex_valid, ex_reg_we, ex_is_ret, mem_valid, mem_reg_we, mem_is_ret;
  logic stall, hold_fetch;
  int checks = 0, failures = 0;

  hazard_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_stall, exp_hold;
    logic [3:0] need [2];
    bit needv [2];
    for (int n = 0; n < 20000; n++) begin
      {id_valid, id_use_a, id_use_b, id_is_ret, ex_valid, ex_reg_we, ex_is_ret,
       mem_valid, mem_reg_we, mem_is_ret} = 10'($urandom);
      // small register range so that matches are frequent
      id_src_a = 4'($urandom_range(0, 3)); id_src_b = 4'($urandom_range(0, 3));
      ex_dest = 4'($urandom_range(0, 3));  mem_dest = 4'($urandom_range(0, 3));
      #1;
      need[0] = id_src_a; needv[0] = id_use_a;
      need[1] = id_src_b; needv[1] = id_use_b;
      exp_stall = 0;
      for (int k = 0; k < 2; k++)
        if (id_valid && needv[k]) begin
          if (ex_valid && ex_reg_we && ex_dest == need[k]) exp_stall = 1;
          if (mem_valid && mem_reg_we && mem_dest == need[k]) exp_stall = 1;
        end
      exp_hold = (id_valid && id_is_ret) || (ex_valid && ex_is_ret) || (mem_valid && mem_is_ret);
      checks++;
      if (stall !== exp_stall || hold_fetch !== exp_hold) begin
        failures++;
        $display("FAIL n=%0d stall=%b exp %b hold=%b exp %b", n, stall, exp_stall, hold_fetch, exp_hold);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
