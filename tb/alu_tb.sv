// alu_tb: self-checking testbench of the ALU.
// Drives directed corner cases (overflow boundaries, zero results, shift
// amounts 0 and 15) and random operands through every operation, and compares
// the result and Z, V, N with values computed here by integer arithmetic.
// Flags are compared only for the operations that write them.
module alu_tb;
  import wisc_pkg::*;

  alu_op_e op;
  word_t a, b, y;
  flags_t flags;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(alu_op_e o, word_t ta, word_t tb);
    word_t ey;
    int r;
    bit ez, ev, en, fl;
    op = o; a = ta; b = tb;
    #1;
    ev = 0; en = 0; fl = 1;
    case (o)
      ALU_ADD:  begin r = int'($signed(ta)) + int'($signed(tb)); ey = r[15:0]; ev = r > 32767 || r < -32768; en = ey[15]; end
      ALU_SUB:  begin r = int'($signed(ta)) - int'($signed(tb)); ey = r[15:0]; ev = r > 32767 || r < -32768; en = ey[15]; end
      ALU_NAND: ey = ~(ta & tb);
      ALU_XOR:  ey = ta ^ tb;
      ALU_SRA:  begin r = int'($signed(ta)); for (int i = 0; i < int'(tb[3:0]); i++) r = r / 2 - ((r < 0 && r % 2 != 0) ? 1 : 0); ey = r[15:0]; fl = 0; end
      ALU_SRL:  begin ey = ta; for (int i = 0; i < int'(tb[3:0]); i++) ey = {1'b0, ey[15:1]}; fl = 0; end
      ALU_SLL:  begin ey = ta; for (int i = 0; i < int'(tb[3:0]); i++) ey = {ey[14:0], 1'b0}; fl = 0; end
      ALU_LHB:  begin ey = {tb[7:0], ta[7:0]}; fl = 0; end
      default:  begin ey = {ta[15:8], tb[7:0]}; fl = 0; end
    endcase
    ez = (ey == 0);
    checks++;
    if (y !== ey || (fl && flags !== {ez, ev, en})) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp %h flags=%b exp %b", o.name(), ta, tb, y, ey, flags, {ez, ev, en});
    end
  endtask

  initial begin
    alu_op_e ops [9] = '{ALU_ADD, ALU_SUB, ALU_NAND, ALU_XOR, ALU_SRA, ALU_SRL, ALU_SLL, ALU_LHB, ALU_LLB};
    word_t corner [8] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h8001, 16'h00FF, 16'h000F};
    foreach (ops[i]) foreach (corner[j]) foreach (corner[k]) one(ops[i], corner[j], corner[k]);
    repeat (20000) one(ops[$urandom_range(0, 8)], 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
