// tb_rv32il_immgen: self-checking test of rv32il_immgen.
//
// Encodes random immediates into I, S and B words with the testbench
// encoders (random register fields around them), and checks that the
// generator returns the same value sign-extended to 32 bits. Covers the
// range ends (-2048/+2047 for I and S, -4096/+4094 for B) and the
// card's worked words (0x00500093 -> 5, 0x00612623 -> 12, 0x00028463 -> 8).
module tb_rv32il_immgen;
  import rv32il_pkg::*;
  import rv32il_enc_pkg::*;

  logic [31:0] instr, imm;
  fmt_e        fmt;
  int checks = 0, failures = 0;

  rv32il_immgen dut (.instr(instr), .fmt(fmt), .imm(imm));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fmt_e f, logic [31:0] w, int exp);
    fmt = f; instr = w; #1;
    checks++;
    if (imm !== 32'(exp)) begin
      failures++;
      $display("FAIL fmt=%s instr=%08h imm=%08h exp=%08h", f.name(), w, imm, 32'(exp));
    end
  endtask

  initial begin
    run(FMT_I, 32'h00500093, 5);
    run(FMT_S, 32'h00612623, 12);
    run(FMT_B, 32'h00028463, 8);
    run(FMT_I, addi_(3, 4, -2048), -2048);
    run(FMT_I, addi_(3, 4, 2047), 2047);
    run(FMT_I, addi_(3, 4, -1), -1);
    run(FMT_S, sw_(7, -2048, 1), -2048);
    run(FMT_S, sw_(7, 2047, 1), 2047);
    run(FMT_B, beq_(1, 2, -4096), -4096);
    run(FMT_B, bne_(1, 2, 4094), 4094);
    run(FMT_B, beq_(1, 2, 2048), 2048);   // only imm[11] set: instruction bit 7
    run(FMT_B, beq_(1, 2, -2), -2);
    for (int k = 0; k < 5000; k++) begin
      int v, rd, r1, r2;
      v  = $urandom_range(0, 4095) - 2048;
      rd = $urandom_range(0, 7); r1 = $urandom_range(0, 7); r2 = $urandom_range(0, 7);
      run(FMT_I, addi_(rd, r1, v), v);
      run(FMT_I, lw_(rd, v, r1), v);
      run(FMT_I, jalr_(rd, r1, v), v);
      run(FMT_S, sw_(r2, v, r1), v);
      v = 2 * ($urandom_range(0, 4095) - 2048);
      run(FMT_B, beq_(r1, r2, v), v);
      run(FMT_B, bne_(r1, r2, v), v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
