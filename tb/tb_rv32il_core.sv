// tb_rv32il_core: end-to-end test of the RV32I-Lite core at its default
// parameters.
//
// The testbench holds the instruction and data memories (word arrays, read
// combinationally, data written on the rising edge, little-endian words,
// address bits [1:0] ignored) and a small instruction-set model of its own
// that executes the same program in lockstep. Every cycle the core's fetch
// address, store strobe, store address and data, and halt flag are compared
// with the model; register values show up through the stores.
//
// Programs:
//   1. a directed program using all 11 instructions and the pseudo forms
//      (nop, li, mv, neg, beqz, bnez, ret), a counted loop with a backward
//      bne, beq x0,x0 as an unconditional jump, a call through jalr with an
//      odd target (bit 0 must be cleared), writes to x0, and final stores of
//      every register whose values are also checked against hand-computed
//      constants. It ends on the all-zeros word, which must halt the core.
//   2. several random programs of arithmetic, loads, stores and forward
//      branches, ending on an illegal word.
// The core must retire one instruction per clock; the cycle count of the
// directed program is checked against the model's instruction count.
// Each mechanism (taken and not-taken branch, jalr, odd jalr target, load,
// store, subtract, write to x0, halt on the zero word, halt on an
// out-of-range register) is counted and must occur at least once.
module tb_rv32il_core;
  import rv32il_pkg::*;
  import rv32il_enc_pkg::*;

  localparam int IMEM_WORDS = 256;
  localparam int DMEM_WORDS = 1024;

  logic  clk = 0, rst = 1;
  word_t imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic  dmem_re, dmem_we, halted, retire, redirect;

  word_t imem [IMEM_WORDS];
  word_t dmem [DMEM_WORDS];

  rv32il_core dut (
    .clk, .rst,
    .imem_addr, .imem_rdata,
    .dmem_addr, .dmem_re, .dmem_we, .dmem_wdata, .dmem_rdata,
    .halted, .retire, .redirect
  );

  assign imem_rdata = imem[imem_addr[$clog2(IMEM_WORDS)+1:2]];
  assign dmem_rdata = dmem[dmem_addr[$clog2(DMEM_WORDS)+1:2]];
  always_ff @(posedge clk) if (dmem_we) dmem[dmem_addr[$clog2(DMEM_WORDS)+1:2]] <= dmem_wdata;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%08h exp=%08h (cycle %0d)", what, got, exp, cycles);
    end
  endtask

  // ---------------------------------------------------------------------
  // Reference instruction-set model
  // ---------------------------------------------------------------------
  word_t m_x [8];
  word_t m_pc;
  word_t m_dmem [DMEM_WORDS];
  logic  m_halt;
  word_t m_pc_before;
  // what the model expects the core to do this cycle
  logic  m_st;
  word_t m_st_addr, m_st_data;

  // mechanism counters
  int n_br_taken, n_br_not, n_jalr, n_jalr_odd, n_lw, n_sw, n_sub, n_x0w, n_halt_zero, n_halt_reg;

  function automatic int sx(logic [31:0] v, int bits);
    return int'(signed'(v << (32 - bits)) >>> (32 - bits));
  endfunction

  task automatic model_step();
    logic [31:0] w;
    logic [6:0] op; logic [2:0] f3; logic [6:0] f7;
    int rd, r1, r2;
    word_t a, b, immi, imms, immb, res;
    logic  wr, legal;
    w  = imem[m_pc[$clog2(IMEM_WORDS)+1:2]];
    op = w[6:0]; f3 = w[14:12]; f7 = w[31:25];
    rd = int'(w[11:7]); r1 = int'(w[19:15]); r2 = int'(w[24:20]);
    immi = 32'(sx(32'(w[31:20]), 12));
    imms = 32'(sx(32'({w[31:25], w[11:7]}), 12));
    immb = 32'(sx(32'({w[31], w[7], w[30:25], w[11:8], 1'b0}), 13));
    m_st = 0; wr = 0; res = '0; legal = 1;
    a = (r1 < 8) ? m_x[r1 % 8] : '0;
    b = (r2 < 8) ? m_x[r2 % 8] : '0;
    if (op == 7'h33 && (f7 == 7'h00 || (f7 == 7'h20 && f3 == 0)) && f3 inside {0, 4, 6, 7}) begin
      legal = (rd < 8 && r1 < 8 && r2 < 8);
      wr = 1;
      case (f3)
        0: begin res = f7[5] ? a - b : a + b; if (f7[5] && legal) n_sub++; end
        4: res = a ^ b;
        6: res = a | b;
        default: res = a & b;
      endcase
      m_pc += 4;
    end else if (op == 7'h13 && f3 == 0) begin
      legal = (rd < 8 && r1 < 8);
      wr = 1; res = a + immi; m_pc += 4;
    end else if (op == 7'h03 && f3 == 2) begin
      legal = (rd < 8 && r1 < 8);
      wr = 1; res = m_dmem[(a + immi) >> 2 & (DMEM_WORDS - 1)]; m_pc += 4;
      if (legal) n_lw++;
    end else if (op == 7'h67 && f3 == 0) begin
      legal = (rd < 8 && r1 < 8);
      wr = 1; res = m_pc + 4;
      if (legal) begin
        n_jalr++;
        if ((a + immi) & 1) n_jalr_odd++;
        m_pc = (a + immi) & ~32'd1;
      end
    end else if (op == 7'h23 && f3 == 2) begin
      legal = (r1 < 8 && r2 < 8);
      if (legal) begin
        m_st = 1; m_st_addr = a + imms; m_st_data = b;
        n_sw++;
      end
      m_pc += 4;
    end else if (op == 7'h63 && (f3 == 0 || f3 == 1)) begin
      legal = (r1 < 8 && r2 < 8);
      if (legal) begin
        if ((a == b) ^ f3[0]) begin m_pc += immb; n_br_taken++; end
        else begin m_pc += 4; n_br_not++; end
      end
    end else begin
      legal = 0;
    end
    if (!legal) begin
      m_halt = 1;
      m_st = 0;
      if (w == 0) n_halt_zero++; else n_halt_reg++;
      // pc does not move on halt: undo the increment
      m_pc = m_pc_before;
    end else begin
      if (wr && rd == 0) n_x0w++;
      if (wr && rd != 0) m_x[rd] = res;
      if (m_st) m_dmem[m_st_addr >> 2 & (DMEM_WORDS - 1)] = m_st_data;
    end
  endtask

  // Compare the core with the model for one cycle, then advance both.
  // Called just after a falling edge; waits for the next one.
  task automatic lockstep_cycle();
    chk("halted", 32'(halted), 32'(m_halt));
    chk("fetch pc", imem_addr, m_pc);
    if (!m_halt) begin
      m_pc_before = m_pc;
      model_step();
      chk("store strobe", 32'(dmem_we), 32'(m_st));
      if (m_st) begin
        chk("store addr", dmem_addr & ~32'd3, m_st_addr & ~32'd3);
        chk("store data", dmem_wdata, m_st_data);
      end
      chk("retire", 32'(retire), 32'(!m_halt));
    end else begin
      chk("no store when halted", 32'(dmem_we), 0);
    end
    @(negedge clk);
  endtask

  task automatic reset_all();
    rst = 1;
    foreach (dmem[i]) begin dmem[i] = '0; m_dmem[i] = '0; end
    foreach (m_x[i]) m_x[i] = '0;
    m_pc = '0; m_halt = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
  endtask

  // Run until the model halts; returns the number of cycles spent executing.
  task automatic run_program(input int max_cycles, output int ncyc);
    ncyc = 0;
    while (!m_halt && ncyc < max_cycles) begin
      lockstep_cycle();
      if (!m_halt) ncyc++;
    end
    lockstep_cycle();  // the cycle after: core must report halted
    lockstep_cycle();
    checks++;
    if (!m_halt) begin failures++; $display("FAIL program did not halt"); end
  endtask

  // ---------------------------------------------------------------------
  // Directed program
  // ---------------------------------------------------------------------
  int pcw;
  task automatic emit(word_t w);
    imem[pcw] = w; pcw++;
  endtask

  task automatic load_directed();
    foreach (imem[i]) imem[i] = '0;
    pcw = 0;
    emit(32'h00500093);          //  0 addi x1,x0,5   (li ra,5)
    emit(addi_(2, 0, 256));      //  1 li sp,256
    emit(addi_(6, 0, -7));       //  2 li t1,-7
    emit(32'h00612623);          //  3 sw x6,12(x2)
    emit(lw_(3, 12, 2));         //  4 lw x3,12(x2)       x3 = -7
    emit(sub_(4, 0, 3));         //  5 neg x4,x3          x4 = 7
    emit(add_(5, 4, 1));         //  6 add x5,x4,x1       x5 = 12
    emit(and_(7, 5, 6));         //  7 and x7,x5,x6       12 & -7 = 8
    emit(or_(3, 5, 6));          //  8 or  x3,x5,x6       12 | -7 = -3
    emit(xor_(4, 5, 6));         //  9 xor x4,x5,x6       12 ^ -7 = -11
    emit(addi_(5, 0, 3));        // 10 li x5,3            loop counter
    emit(addi_(7, 7, 1));        // 11 loop: addi x7,x7,1
    emit(addi_(5, 5, -1));       // 12 addi x5,x5,-1
    emit(bne_(5, 0, -8));        // 13 bnez x5,loop       x7 = 11, x5 = 0
    emit(32'h00028463);          // 14 beq x5,x0,+8 (beqz) -> 16
    emit(addi_(7, 0, 99));       // 15 skipped
    emit(addi_(6, 0, 4*24 + 1)); // 16 li t1,func+1 (odd target)
    emit(jalr_(1, 6, 0));        // 17 jalr ra,t1,0 -> 24, ra = 72
    emit(sw_(7, 0, 2));          // 18 sw x7,0(sp)
    emit(beq_(0, 0, 4*(26-19))); // 19 beq x0,x0 -> 26
    emit(addi_(7, 0, 77));       // 20 skipped
    emit(addi_(7, 0, 78));       // 21 skipped
    emit(32'h0);                 // 22 never reached
    emit(32'h0);                 // 23 never reached
    emit(addi_(0, 0, 55));       // 24 func: write to x0 (discarded)
    emit(32'h00008067);          // 25 ret
    emit(32'h00000013);          // 26 nop
    emit(addi_(6, 4, 0));        // 27 mv t1,x4           x6 = -11
    emit(sw_(0, 4, 2));          // 28 sw x0,4(sp)
    emit(sw_(1, 8, 2));          // 29 sw x1,8(sp)
    emit(sw_(3, 16, 2));         // 30 sw x3,16(sp)
    emit(sw_(4, 20, 2));         // 31 sw x4,20(sp)
    emit(sw_(5, 24, 2));         // 32 sw x5,24(sp)
    emit(sw_(6, 28, 2));         // 33 sw x6,28(sp)
    emit(sw_(2, -4, 2));         // 34 sw x2,-4(sp)
    emit(bne_(5, 0, 8));         // 35 bnez x5 (not taken)
    emit(32'h0);                 // 36 HALT
  endtask

  // Random straight-line program with forward branches.
  task automatic load_random(int len);
    foreach (imem[i]) imem[i] = '0;
    pcw = 0;
    for (int r = 1; r < 8; r++) emit(addi_(r, 0, $urandom_range(0, 4095) - 2048));
    emit(addi_(2, 0, 1024));     // sp inside data memory
    while (pcw < len) begin
      int k, rd, r1, r2;
      k  = $urandom_range(0, 11);
      rd = $urandom_range(0, 7); r1 = $urandom_range(0, 7); r2 = $urandom_range(0, 7);
      if (rd == 2 && k inside {5, 6}) rd = 3;   // keep sp for memory traffic
      case (k)
        0: emit(add_(rd, r1, r2));
        1: emit(sub_(rd, r1, r2));
        2: emit(and_(rd, r1, r2));
        3: emit(or_(rd, r1, r2));
        4: emit(xor_(rd, r1, r2));
        5: emit(addi_(rd, r1, $urandom_range(0, 4095) - 2048));
        6: emit(lw_(rd, 4 * $urandom_range(0, 63), 2));
        7, 8: emit(sw_(r2, 4 * $urandom_range(0, 63), 2));
        9: emit(beq_(r1, $urandom_range(0, 1) ? r1 : r2, 4 * $urandom_range(1, 4)));
        10: emit(bne_(r1, r2, 4 * $urandom_range(1, 4)));
        default: emit(addi_(rd, 0, $urandom_range(0, 15)));
      endcase
    end
    for (int i = 0; i < 5; i++) emit(32'h00000013);  // landing pad for forward branches
    emit($urandom_range(0, 1) ? 32'h0 : add_(9, 1, 2));  // zero word or out-of-range register
  endtask

  int ncyc;
  initial begin
    n_br_taken = 0; n_br_not = 0; n_jalr = 0; n_jalr_odd = 0; n_lw = 0; n_sw = 0;
    n_sub = 0; n_x0w = 0; n_halt_zero = 0; n_halt_reg = 0;

    load_directed();
    reset_all();
    run_program(1000, ncyc);
    // one instruction per clock: the directed program executes 37 instructions
    chk("directed cycle count", 32'(ncyc), 32'd37);
    // hand-computed results, read back from data memory (sp = 256)
    chk("mem[sp+12] = -7", dmem[(256 + 12) / 4], -32'sd7);
    chk("mem[sp+0]  = x7", dmem[256 / 4], 32'd11);
    chk("mem[sp+4]  = x0", dmem[(256 + 4) / 4], 32'd0);
    chk("mem[sp+8]  = ra", dmem[(256 + 8) / 4], 32'd72);
    chk("mem[sp+16] = or", dmem[(256 + 16) / 4], -32'sd3);
    chk("mem[sp+20] = xor", dmem[(256 + 20) / 4], -32'sd11);
    chk("mem[sp+24] = 0", dmem[(256 + 24) / 4], 32'd0);
    chk("mem[sp+28] = mv", dmem[(256 + 28) / 4], -32'sd11);
    chk("mem[sp-4]  = sp", dmem[(256 - 4) / 4], 32'd256);
    chk("halt pc", imem_addr, 32'd4 * 36);

    for (int p = 0; p < 20; p++) begin
      load_random(200);
      reset_all();
      run_program(1000, ncyc);
      foreach (dmem[i]) chk("final memory", dmem[i], m_dmem[i]);
    end

    $display("mechanisms: br_taken=%0d br_not=%0d jalr=%0d jalr_odd=%0d lw=%0d sw=%0d sub=%0d x0_write=%0d halt_zero=%0d halt_reg=%0d",
             n_br_taken, n_br_not, n_jalr, n_jalr_odd, n_lw, n_sw, n_sub, n_x0w, n_halt_zero, n_halt_reg);
    if (n_br_taken == 0) begin failures++; $display("FAIL no taken branch"); end
    if (n_br_not == 0)   begin failures++; $display("FAIL no not-taken branch"); end
    if (n_jalr == 0)     begin failures++; $display("FAIL no jalr"); end
    if (n_jalr_odd == 0) begin failures++; $display("FAIL no odd jalr target"); end
    if (n_lw == 0)       begin failures++; $display("FAIL no load"); end
    if (n_sw == 0)       begin failures++; $display("FAIL no store"); end
    if (n_sub == 0)      begin failures++; $display("FAIL no sub"); end
    if (n_x0w == 0)      begin failures++; $display("FAIL no write to x0"); end
    if (n_halt_zero == 0) begin failures++; $display("FAIL no zero-word halt"); end
    if (n_halt_reg == 0) begin failures++; $display("FAIL no out-of-range-register halt"); end
    checks += 10;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
