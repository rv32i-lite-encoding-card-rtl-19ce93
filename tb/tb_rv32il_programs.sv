// tb_rv32il_programs: runs the idioms an RV32I-Lite program relies on, on
// the core at its default parameters.
//
// The subset has no lui/auipc, shifts, compares or multiply, so programs
// build those from the 11 instructions. This testbench assembles four small
// programs with the testbench encoders, runs each on rv32il_core with
// behavioural memories (combinational read, write on the rising edge), and
// checks the results left in data memory and the number of clocks taken:
//   la     : addi rd,gp,off + lw rd,0(rd) through a per-symbol pointer table
//            at gp+0x40; slots 0, 1 and 495, the last one a 12-bit offset
//            reaches ((2048 - 0x40)/4 = 496 slots)
//   shift  : x << k as k self-adds (add rd,rd,rd) in a counted loop
//   lt     : signed a < b as sub, and with a sign-bit mask loaded through la,
//            then beqz over the 'set' instruction
//   mul    : 32-step shift-and-add multiply with and/add/bnez only, for
//            random operands; expected clocks 198 + popcount(b)
// One instruction retires per clock, so each program's clock count until
// halt must equal the instruction count worked out here.
module tb_rv32il_programs;
  import rv32il_pkg::*;
  import rv32il_enc_pkg::*;

  localparam int IMEM_WORDS = 256;
  localparam int DMEM_WORDS = 2048;
  localparam int GP         = 32'h400;   // global pointer used by the programs
  localparam int RES        = 32'h100;   // result area, reached from x0

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
      $display("FAIL %s got=%08h (%0d) exp=%08h (%0d)", what, got, signed'(got), exp, signed'(exp));
    end
  endtask

  int pcw;
  task automatic emit(word_t w);
    imem[pcw] = w; pcw++;
  endtask

  task automatic clear();
    foreach (imem[i]) imem[i] = '0;
    foreach (dmem[i]) dmem[i] = '0;
    pcw = 0;
  endtask

  // Reset, run to halt; return the clocks spent executing.
  task automatic run(output int clocks);
    int retired;
    rst = 1;
    @(negedge clk); @(negedge clk);
    rst = 0;
    clocks = 0; retired = 0;
    while (!halted && clocks < 10000) begin
      if (retire) retired++;
      @(negedge clk);
      clocks++;
    end
    // the last clock is the one that met the halting word
    clocks--;
    chk("one retire per clock", 32'(retired), 32'(clocks));
  endtask

  function automatic word_t dm(int byte_addr);
    return dmem[byte_addr / 4];
  endfunction

  // la rd, slot k: pointer table at gp+0x40
  task automatic emit_la(int rd, int k);
    emit(addi_(rd, 3, 'h40 + 4 * k));
    emit(lw_(rd, 0, rd));
  endtask

  int clocks;

  initial begin
    // ---------------- la through the pointer table ----------------
    begin
      automatic int slots [3] = '{0, 1, 495};
      clear();
      emit(addi_(3, 0, GP));                 // gp
      foreach (slots[i]) begin
        emit_la(5, slots[i]);                // x5 = &sym
        emit(lw_(6, 0, 5));                  // x6 = sym
        emit(sw_(6, RES + 4 * i, 0));
      end
      emit(32'h0);
      foreach (slots[i]) begin
        int sym_addr;
        sym_addr = 'h1000 + 8 * slots[i];    // symbols in .data beyond the table
        dmem[(GP + 'h40 + 4 * slots[i]) / 4] = sym_addr;
        dmem[sym_addr / 4] = 32'hA5000000 + slots[i];
      end
      run(clocks);
      foreach (slots[i]) chk($sformatf("la slot %0d", slots[i]), dm(RES + 4 * i), 32'hA5000000 + slots[i]);
      chk("la clocks", 32'(clocks), 32'(1 + 3 * 4));
      chk("last slot offset fits 12 bits", 32'('h40 + 4 * 495 <= 2047), 1);
    end

    // ---------------- shift left by k via self-adds ----------------
    for (int k = 0; k <= 31; k += 5) begin
      word_t v;
      v = $urandom;
      clear();
      dmem[RES / 4] = v;
      emit(lw_(6, RES, 0));                  // x6 = v
      emit(addi_(5, 0, k));                  // x5 = k
      emit(beq_(5, 0, 16));                  // k == 0: skip the loop
      emit(add_(6, 6, 6));                   // loop: x6 += x6
      emit(addi_(5, 5, -1));
      emit(bne_(5, 0, -8));
      emit(sw_(6, RES + 4, 0));
      emit(32'h0);
      run(clocks);
      chk($sformatf("shift by %0d", k), dm(RES + 4), v << k);
      chk($sformatf("shift by %0d clocks", k), 32'(clocks), 32'(4 + 3 * k));
    end

    // ---------------- signed less-than via sub + sign mask ----------------
    begin
      automatic int a [6] = '{3, 7, -5, 2, -100, 0};
      automatic int b [6] = '{7, 3, 2, -5, -100, -1};
      foreach (a[i]) begin
        clear();
        dmem[RES / 4]       = a[i];
        dmem[(RES + 4) / 4] = b[i];
        dmem[(GP + 'h40) / 4] = 'h1000;      // la slot 0 -> constant 0x80000000
        dmem['h1000 / 4] = 32'h8000_0000;
        emit(addi_(3, 0, GP));               // gp
        emit(lw_(5, RES, 0));                // x5 = a
        emit(lw_(6, RES + 4, 0));            // x6 = b
        emit(sub_(7, 5, 6));                 // x7 = a - b
        emit_la(4, 0);                       // x4 = &MSB
        emit(lw_(4, 0, 4));                  // x4 = 0x80000000
        emit(and_(7, 7, 4));                 // sign bit of a - b
        emit(addi_(1, 0, 0));                // result = 0
        emit(beq_(7, 0, 8));                 // not less: skip
        emit(addi_(1, 0, 1));                // result = 1
        emit(sw_(1, RES + 8, 0));
        emit(32'h0);
        run(clocks);
        chk($sformatf("%0d < %0d", a[i], b[i]), dm(RES + 8), 32'(a[i] < b[i]));
        chk("lt clocks", 32'(clocks), 32'(a[i] < b[i] ? 12 : 11));
      end
    end

    // ---------------- shift-and-add multiply ----------------
    for (int t = 0; t < 12; t++) begin
      word_t a, b;
      a = $urandom; b = (t == 0) ? 32'hFFFF_FFFF : (t == 1) ? 0 : $urandom;
      clear();
      dmem[RES / 4]       = a;
      dmem[(RES + 4) / 4] = b;
      emit(lw_(1, RES, 0));                  // x1 = a (shifted)
      emit(lw_(2, RES + 4, 0));              // x2 = b
      emit(addi_(4, 0, 1));                  // x4 = mask
      emit(addi_(5, 0, 0));                  // x5 = acc
      emit(addi_(7, 0, 32));                 // x7 = count
      emit(and_(6, 2, 4));                   // loop: bit of b
      emit(beq_(6, 0, 8));                   //   clear: skip the add
      emit(add_(5, 5, 1));                   //   acc += a
      emit(add_(1, 1, 1));                   //   a <<= 1
      emit(add_(4, 4, 4));                   //   mask <<= 1
      emit(addi_(7, 7, -1));
      emit(bne_(7, 0, -24));
      emit(sw_(5, RES + 8, 0));
      emit(32'h0);
      run(clocks);
      chk($sformatf("mul %08h * %08h", a, b), dm(RES + 8), a * b);
      chk("mul clocks", 32'(clocks), 32'(198 + $countones(b)));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
