// rv32il_core: single-cycle RV32I-Lite processor.
//
// Executes one instruction per clock: the word at pc is fetched from the
// instruction port, decoded (rv32il_decoder), its immediate rebuilt
// (rv32il_immgen), registers read (rv32il_regfile), the ALU result or
// address formed (rv32il_alu), the next pc chosen (rv32il_next_pc), and on
// the following rising edge rd, memory and pc are updated together.
// Instructions and their semantics are the 11 of RV32I-Lite: add, sub, and,
// or, xor, addi, lw, jalr, sw, beq, bne.
//
// Memory ports: both memories are read combinationally within the cycle.
// imem_addr and dmem_addr are byte addresses; all accesses are 32-bit words,
// little-endian, and must be word aligned. The core does not check
// alignment of loads and stores; an external memory is expected to ignore
// address bits [1:0]. dmem_we is the store strobe, sampled by the memory at
// the same rising edge that ends the cycle.
//
// Halt: an illegal word (the all-zeros word, any opcode/funct outside the
// subset, or a register field above x7) is not executed. The core sets
// `halted`, stops pc and makes no further writes until reset. Halting,
// the reset pc (RESET_PC) and the synchronous active-high reset are this
// design's choices; the single-cycle organisation is too.
module rv32il_core
  import rv32il_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic  clk,
  input  logic  rst,
  // instruction memory
  output word_t imem_addr,
  input  word_t imem_rdata,
  // data memory
  output word_t dmem_addr,
  output logic  dmem_re,
  output logic  dmem_we,
  output word_t dmem_wdata,
  input  word_t dmem_rdata,
  // status
  output logic  halted,
  output logic  retire,     // an instruction completes at the coming edge
  output logic  redirect    // that instruction is a taken branch or a jalr
);

  word_t pc;
  word_t instr;
  ctrl_t ctrl;
  word_t imm;
  word_t rs1_val, rs2_val;
  word_t alu_b, alu_result, alu_sum;
  word_t pc_plus4, next_pc;
  word_t wb_data;
  logic  taken;
  logic  run;

  assign instr     = imem_rdata;
  assign imem_addr = pc;
  assign run       = !halted && !ctrl.illegal;
  assign retire    = run;
  assign redirect  = run && taken;

  rv32il_decoder u_dec (
    .instr (instr),
    .ctrl  (ctrl)
  );

  rv32il_immgen u_imm (
    .instr (instr),
    .fmt   (ctrl.fmt),
    .imm   (imm)
  );

  rv32il_regfile u_rf (
    .clk    (clk),
    .rst    (rst),
    .rs1    (ctrl.rs1),
    .rs2    (ctrl.rs2),
    .rdata1 (rs1_val),
    .rdata2 (rs2_val),
    .we     (run && ctrl.reg_we),
    .rd     (ctrl.rd),
    .wdata  (wb_data)
  );

  assign alu_b = ctrl.alu_imm ? imm : rs2_val;

  rv32il_alu u_alu (
    .a      (rs1_val),
    .b      (alu_b),
    .op     (ctrl.alu_op),
    .result (alu_result),
    .sum    (alu_sum)
  );

  rv32il_next_pc u_npc (
    .pc        (pc),
    .rs1_val   (rs1_val),
    .rs2_val   (rs2_val),
    .imm       (imm),
    .alu_sum   (alu_sum),
    .branch    (ctrl.branch),
    .branch_ne (ctrl.branch_ne),
    .jalr      (ctrl.jalr),
    .taken     (taken),
    .pc_plus4  (pc_plus4),
    .next_pc   (next_pc)
  );

  assign dmem_addr  = alu_sum;
  assign dmem_re    = run && ctrl.mem_re;
  assign dmem_we    = run && ctrl.mem_we;
  assign dmem_wdata = rs2_val;

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb_data = dmem_rdata;
      WB_PC4:  wb_data = pc_plus4;
      default: wb_data = alu_result;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= RESET_PC;
      halted <= 1'b0;
    end else if (!halted) begin
      if (ctrl.illegal) halted <= 1'b1;
      else              pc     <= next_pc;
    end
  end

  // A store and a load never happen in the same instruction.
  assert property (@(posedge clk) disable iff (rst) !(dmem_we && dmem_re));
  // Once halted, nothing is written.
  assert property (@(posedge clk) disable iff (rst) halted |-> !dmem_we);

endmodule
