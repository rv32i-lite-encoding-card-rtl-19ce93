// rv32il_next_pc: branch decision and next-PC selection for RV32I-Lite.
//
// Picks the address of the next instruction:
//   beq/bne taken : pc + imm  (imm is the sign-extended 13-bit B offset,
//                              already a byte offset with bit 0 = 0)
//   jalr          : (rs1 + imm) & ~1, the sum coming from the ALU adder;
//                   bit 0 is forced to zero whatever the sum
//   otherwise     : pc + 4
// beq is taken when rs1 == rs2, bne when they differ. pc + 4 is also brought
// out as the jalr link value. RV32I-Lite has no jal, so these are the only
// control transfers.
//
// Using an equality comparator (rather than the ALU's subtract) and
// reusing the ALU sum for the jalr target are this design's choices.
// Combinational.
module rv32il_next_pc
  import rv32il_pkg::*;
(
  input  word_t pc,
  input  word_t rs1_val,
  input  word_t rs2_val,
  input  word_t imm,
  input  word_t alu_sum,    // rs1 + imm
  input  logic  branch,
  input  logic  branch_ne,
  input  logic  jalr,
  output logic  taken,      // control leaves the fall-through path
  output word_t pc_plus4,
  output word_t next_pc
);

  logic eq;
  assign eq       = (rs1_val == rs2_val);
  assign pc_plus4 = pc + word_t'(4);

  always_comb begin
    taken   = 1'b0;
    next_pc = pc_plus4;
    if (jalr) begin
      taken   = 1'b1;
      next_pc = {alu_sum[XLEN-1:1], 1'b0};
    end else if (branch && (eq ^ branch_ne)) begin
      taken   = 1'b1;
      next_pc = pc + imm;
    end
  end

endmodule
