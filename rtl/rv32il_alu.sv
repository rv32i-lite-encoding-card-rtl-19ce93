// rv32il_alu: the RV32I-Lite arithmetic and logic unit.
//
// One XLEN-bit adder serves add, addi, sub and every address calculation
// (lw, sw, jalr). For sub the b operand is inverted and the carry-in is 1,
// giving a + ~b + 1 = a - b; the select is the single funct7 bit that tells
// sub from add. The logic operations and, or, xor act bitwise. The sum is
// also brought out on its own, so the address path does not depend on the
// operation select. The shared adder and its carry-in subtract follow the
// instruction set's description; the separate sum output is this design's
// own choice.
//
// Interface: a, b, op (rv32il_pkg::alu_op_e) in; result and sum out.
// Combinational.
module rv32il_alu
  import rv32il_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e op,
  output word_t   result,
  output word_t   sum
);

  logic  sub;
  word_t b_eff;

  assign sub   = (op == ALU_SUB);
  assign b_eff = sub ? ~b : b;
  assign sum   = a + b_eff + word_t'(sub);

  always_comb begin
    unique case (op)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_XOR: result = a ^ b;
      default: result = sum;  // ALU_ADD, ALU_SUB
    endcase
  end

endmodule
