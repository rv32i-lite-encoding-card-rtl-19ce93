// tb_rv32il_next_pc: self-checking test of rv32il_next_pc.
//
// Random pc, operands and offsets for fall-through, beq, bne and jalr.
// Equal operands are forced half the time so both branch outcomes occur.
// Expected: pc+4 when not taken, pc+imm for a taken branch, and
// (rs1+imm) with bit 0 cleared for jalr, including odd sums.
module tb_rv32il_next_pc;
  import rv32il_pkg::*;

  word_t pc, rs1_val, rs2_val, imm, alu_sum, pc_plus4, next_pc;
  logic  branch, branch_ne, jalr, taken;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not = 0, n_jalr = 0, n_odd = 0;

  rv32il_next_pc dut (.pc, .rs1_val, .rs2_val, .imm, .alu_sum, .branch, .branch_ne,
                      .jalr, .taken, .pc_plus4, .next_pc);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%08h exp=%08h", what, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 20000; k++) begin
      int kind;
      logic exp_taken;
      word_t exp_pc;
      kind = $urandom_range(0, 3);    // 0 plain, 1 beq, 2 bne, 3 jalr
      pc = $urandom & ~32'd3;
      rs1_val = $urandom;
      rs2_val = $urandom_range(0, 1) ? rs1_val : $urandom;
      imm = 32'(2 * ($urandom_range(0, 4095) - 2048));
      branch = (kind == 1 || kind == 2);
      branch_ne = (kind == 2);
      jalr = (kind == 3);
      if (jalr) imm = 32'($urandom_range(0, 4095) - 2048);
      alu_sum = rs1_val + imm;
      #1;
      exp_taken = 0; exp_pc = pc + 4;
      if (kind == 3) begin
        exp_taken = 1; exp_pc = alu_sum & ~32'd1; n_jalr++;
        if (alu_sum[0]) n_odd++;
      end else if ((kind == 1 && rs1_val == rs2_val) || (kind == 2 && rs1_val != rs2_val)) begin
        exp_taken = 1; exp_pc = pc + imm;
      end
      if (kind inside {1, 2}) begin if (exp_taken) n_taken++; else n_not++; end
      chk("pc_plus4", pc_plus4, pc + 4);
      chk("next_pc", next_pc, exp_pc);
      chk("taken", 32'(taken), 32'(exp_taken));
    end
    checks++;
    if (n_taken == 0 || n_not == 0 || n_jalr == 0 || n_odd == 0) begin
      failures++; $display("FAIL coverage taken=%0d not=%0d jalr=%0d odd=%0d", n_taken, n_not, n_jalr, n_odd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
