// rv32il_enc_pkg: instruction encoders used by the testbenches.
//
// Builds RV32I-Lite words from assembly-level operands by placing each field
// at its format's bit positions, independently of the decoder and immediate
// generator under test. Register arguments are 0..7 (or larger, to build
// deliberately out-of-range words); immediates are byte offsets.
package rv32il_enc_pkg;

  function automatic logic [31:0] enc_r(input logic [6:0] f7, input logic [2:0] f3,
                                        input int rd, input int rs1, input int rs2);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), 7'b0110011};
  endfunction

  function automatic logic [31:0] enc_i(input logic [6:0] opc, input logic [2:0] f3,
                                        input int rd, input int rs1, input int imm);
    logic [11:0] i12;
    i12 = 12'(imm);
    return {i12, 5'(rs1), f3, 5'(rd), opc};
  endfunction

  function automatic logic [31:0] enc_s(input int rs2, input int rs1, input int imm);
    logic [11:0] i12;
    i12 = 12'(imm);
    return {i12[11:5], 5'(rs2), 5'(rs1), 3'b010, i12[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] enc_b(input logic [2:0] f3, input int rs1, input int rs2,
                                        input int off);
    logic [12:0] i13;
    i13 = 13'(off);
    return {i13[12], i13[10:5], 5'(rs2), 5'(rs1), f3, i13[4:1], i13[11], 7'b1100011};
  endfunction

  // Assembly-level helpers
  function automatic logic [31:0] add_ (int rd, int a, int b); return enc_r(7'h00, 3'b000, rd, a, b); endfunction
  function automatic logic [31:0] sub_ (int rd, int a, int b); return enc_r(7'h20, 3'b000, rd, a, b); endfunction
  function automatic logic [31:0] and_ (int rd, int a, int b); return enc_r(7'h00, 3'b111, rd, a, b); endfunction
  function automatic logic [31:0] or_  (int rd, int a, int b); return enc_r(7'h00, 3'b110, rd, a, b); endfunction
  function automatic logic [31:0] xor_ (int rd, int a, int b); return enc_r(7'h00, 3'b100, rd, a, b); endfunction
  function automatic logic [31:0] addi_(int rd, int a, int i); return enc_i(7'b0010011, 3'b000, rd, a, i); endfunction
  function automatic logic [31:0] lw_  (int rd, int i, int a); return enc_i(7'b0000011, 3'b010, rd, a, i); endfunction
  function automatic logic [31:0] jalr_(int rd, int a, int i); return enc_i(7'b1100111, 3'b000, rd, a, i); endfunction
  function automatic logic [31:0] sw_  (int s, int i, int a);  return enc_s(s, a, i); endfunction
  function automatic logic [31:0] beq_ (int a, int b, int o);  return enc_b(3'b000, a, b, o); endfunction
  function automatic logic [31:0] bne_ (int a, int b, int o);  return enc_b(3'b001, a, b, o); endfunction

endpackage
