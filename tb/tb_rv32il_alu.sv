// tb_rv32il_alu: self-checking test of rv32il_alu.
//
// Drives corner and random operands through every operation and compares
// result and sum with SystemVerilog's own +, -, &, |, ^ on 32-bit values
// (wrap-around for add and sub).
module tb_rv32il_alu;
  import rv32il_pkg::*;

  word_t   a, b, result, sum;
  alu_op_e op;
  int checks = 0, failures = 0;

  rv32il_alu dut (.a(a), .b(b), .op(op), .result(result), .sum(sum));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(alu_op_e o, word_t x, word_t y);
    word_t exp;
    op = o; a = x; b = y; #1;
    case (o)
      ALU_ADD: exp = x + y;
      ALU_SUB: exp = x - y;
      ALU_AND: exp = x & y;
      ALU_OR:  exp = x | y;
      default: exp = x ^ y;
    endcase
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL op=%s a=%08h b=%08h result=%08h exp=%08h", o.name(), x, y, result, exp);
    end
    if (o inside {ALU_ADD, ALU_SUB}) begin
      checks++;
      if (sum !== exp) begin failures++; $display("FAIL sum op=%s", o.name()); end
    end
  endtask

  localparam word_t CORNER [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h5555_AAAA};

  initial begin
    for (int o = 0; o < 5; o++)
      foreach (CORNER[i]) foreach (CORNER[j]) run(alu_op_e'(o), CORNER[i], CORNER[j]);
    for (int k = 0; k < 20000; k++) run(alu_op_e'($urandom_range(0, 4)), $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
