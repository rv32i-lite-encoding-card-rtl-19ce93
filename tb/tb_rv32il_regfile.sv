// tb_rv32il_regfile: self-checking test of rv32il_regfile.
//
// Random writes and reads on both ports against a shadow array kept in the
// testbench. Checks that reset clears x1..x7, that x0 reads zero even after
// being written, and that a write becomes visible on the next cycle.
module tb_rv32il_regfile;
  import rv32il_pkg::*;

  logic  clk = 0, rst = 1;
  ridx_t rs1, rs2, rd;
  word_t rdata1, rdata2, wdata;
  logic  we;
  word_t shadow [NREGS];
  int checks = 0, failures = 0;
  int cycles = 0;

  rv32il_regfile dut (.clk, .rst, .rs1, .rs2, .rdata1, .rdata2, .we, .rd, .wdata);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
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
    we = 0; rd = 0; wdata = 0; rs1 = 0; rs2 = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    foreach (shadow[i]) shadow[i] = '0;
    for (int i = 0; i < NREGS; i++) begin
      rs1 = ridx_t'(i); rs2 = ridx_t'(i); #1;
      chk("reset p1", rdata1, '0);
      chk("reset p2", rdata2, '0);
    end
    // write x0, must still read zero
    @(negedge clk); we = 1; rd = 0; wdata = 32'hDEAD_BEEF;
    @(negedge clk); we = 0; rs1 = 0; rs2 = 0; #1;
    chk("x0 after write p1", rdata1, '0);
    chk("x0 after write p2", rdata2, '0);
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); rd = ridx_t'($urandom); wdata = $urandom;
      rs1 = ridx_t'($urandom); rs2 = ridx_t'($urandom);
      #1;
      chk("read p1", rdata1, shadow[rs1]);   // old value before the edge
      chk("read p2", rdata2, shadow[rs2]);
      @(posedge clk);
      if (we && rd != 0) shadow[rd] = wdata;
      #1;
      chk("after edge p1", rdata1, shadow[rs1]);
      chk("after edge p2", rdata2, shadow[rs2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
