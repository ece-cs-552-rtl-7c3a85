// decoder_tb: self-checking testbench of the control unit.
// For every opcode with random register and immediate fields, compares the
// control word with one built here from the instruction definitions: which
// registers are read, what is written (register, flags, memory), the ALU
// operation and operand source, and the control-transfer kind.
module decoder_tb;
  import wisc_pkg::*;

  word_t instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t e;
    int op;
    for (int n = 0; n < 4000; n++) begin
      op = n % 16;
      instr = {4'(op), 12'($urandom)};
      #1;
      e = '0;
      e.alu_op = ALU_ADD;
      e.b_sel = B_REG;
      if (op <= 3) begin
        e.alu_op = (op == 0) ? ALU_ADD : (op == 1) ? ALU_SUB : (op == 2) ? ALU_NAND : ALU_XOR;
        e.src_a = instr[7:4]; e.use_a = 1; e.src_b = instr[3:0]; e.use_b = 1;
        e.dest = instr[11:8]; e.reg_we = 1; e.flag_we = 1;
      end else if (op == 4) begin
        e.b_sel = B_SIMM4; e.src_a = instr[7:4]; e.use_a = 1;
        e.dest = instr[11:8]; e.reg_we = 1; e.flag_we = 1;
      end else if (op <= 7) begin
        e.alu_op = (op == 5) ? ALU_SRA : (op == 6) ? ALU_SRL : ALU_SLL;
        e.b_sel = B_UIMM4; e.src_a = instr[7:4]; e.use_a = 1;
        e.dest = instr[11:8]; e.reg_we = 1;
      end else if (op == 8) begin
        e.b_sel = B_SIMM8; e.src_a = 4'd14; e.use_a = 1;
        e.dest = instr[11:8]; e.reg_we = 1; e.mem_rd = 1; e.wb_mem = 1;
      end else if (op == 9) begin
        e.b_sel = B_SIMM8; e.src_a = 4'd14; e.use_a = 1;
        e.src_b = instr[11:8]; e.use_b = 1; e.mem_wr = 1;
      end else if (op == 10 || op == 11) begin
        e.alu_op = (op == 10) ? ALU_LHB : ALU_LLB;
        e.b_sel = B_IMM8; e.src_a = instr[11:8]; e.use_a = 1;
        e.dest = instr[11:8]; e.reg_we = 1;
      end else if (op == 12) begin
        e.is_branch = 1;
      end else if (op == 13) begin
        e.alu_op = ALU_SUB; e.b_sel = B_ONE; e.src_a = 4'd15; e.use_a = 1;
        e.dest = 4'd15; e.reg_we = 1; e.mem_wr = 1; e.is_call = 1;
      end else if (op == 14) begin
        e.b_sel = B_ONE; e.src_a = 4'd15; e.use_a = 1;
        e.dest = 4'd15; e.reg_we = 1; e.mem_rd = 1; e.is_ret = 1;
      end
      // register numbers only matter where they are used
      if (!e.use_a) e.src_a = ctrl.src_a;
      if (!e.use_b) e.src_b = ctrl.src_b;
      if (!e.reg_we) e.dest = ctrl.dest;
      checks++;
      if (ctrl !== e) begin
        failures++;
        $display("FAIL instr %h: got %p expected %p", instr, ctrl, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
