// rv32il_regfile: the eight-entry RV32I-Lite register file.
//
// Registers x0..x7, XLEN bits each, with two combinational read ports and
// one write port written on the rising clock edge. x0 is hardwired to zero:
// it reads as 0 and writes to it are dropped, which is what lets nop, li,
// mv, neg and beqz/bnez be plain real instructions.
//
// The two-read/one-write organisation, asynchronous reads and the
// synchronous active-high reset that clears x1..x7 are this design's
// choices. A write and a read of the same register in one cycle return the
// old value; the new one is visible from the next cycle.
module rv32il_regfile
  import rv32il_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  ridx_t rs1,
  input  ridx_t rs2,
  output word_t rdata1,
  output word_t rdata2,
  input  logic  we,
  input  ridx_t rd,
  input  word_t wdata
);

  word_t regs [1:NREGS-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < NREGS; i++) regs[i] <= '0;
    end else if (we && rd != '0) begin
      regs[rd] <= wdata;
    end
  end

  assign rdata1 = (rs1 == '0) ? '0 : regs[rs1];
  assign rdata2 = (rs2 == '0) ? '0 : regs[rs2];

endmodule
