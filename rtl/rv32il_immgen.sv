// rv32il_immgen: immediate generator for RV32I-Lite.
//
// Rebuilds the signed immediate of an I, S or B instruction and sign-extends
// it to 32 bits. The sign bit is always instruction bit 31, so the upper
// bits are driven from instr[31] whatever the format; only the low bits are
// selected by format:
//   I: imm[11:0]  = instr[31:20]
//   S: imm[11:5]  = instr[31:25], imm[4:0] = instr[11:7]
//   B: imm[12]    = instr[31],    imm[11]  = instr[7],
//      imm[10:5]  = instr[30:25], imm[4:1] = instr[11:8], imm[0] = 0
// R-format has no immediate; its output is zero (this design's choice; the
// datapath does not use it).
//
// Interface: instr and fmt in, imm out. Combinational.
module rv32il_immgen
  import rv32il_pkg::*;
(
  input  word_t instr,
  input  fmt_e  fmt,
  output word_t imm
);

  logic sign;
  assign sign = instr[31];

  always_comb begin
    unique case (fmt)
      FMT_I:   imm = {{20{sign}}, instr[31:20]};
      FMT_S:   imm = {{20{sign}}, instr[31:25], instr[11:7]};
      FMT_B:   imm = {{19{sign}}, sign, instr[7], instr[30:25], instr[11:8], 1'b0};
      default: imm = '0;
    endcase
  end

endmodule
