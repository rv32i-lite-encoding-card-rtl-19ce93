// rv32il_pkg: shared types and constants of the RV32I-Lite processor.
//
// RV32I-Lite is an 11-instruction subset of RV32I (add, sub, and, or, xor,
// addi, lw, jalr, sw, beq, bne) using four of the RV32I formats (R, I, S, B)
// and eight registers x0..x7. Every word it uses is bit-identical to the
// standard RV32I encoding, so the opcode, funct3 and funct7 values below are
// the standard ones. The instruction enum, the ALU operation enum, the
// write-back select and the decoded-control struct are this design's own
// way of passing the decode result through the datapath.
package rv32il_pkg;

  parameter int unsigned XLEN  = 32;  // word size
  parameter int unsigned NREGS = 8;   // x0..x7
  parameter int unsigned RIDX  = $clog2(NREGS);

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RIDX-1:0] ridx_t;

  // Major opcodes, bits [6:0]
  localparam logic [6:0] OPC_OP     = 7'b0110011;  // R: add/sub/and/or/xor
  localparam logic [6:0] OPC_OP_IMM = 7'b0010011;  // I: addi
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;  // I: lw
  localparam logic [6:0] OPC_STORE  = 7'b0100011;  // S: sw
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;  // B: beq/bne
  localparam logic [6:0] OPC_JALR   = 7'b1100111;  // I: jalr

  // funct3, bits [14:12]
  localparam logic [2:0] F3_ADD = 3'b000;
  localparam logic [2:0] F3_XOR = 3'b100;
  localparam logic [2:0] F3_OR  = 3'b110;
  localparam logic [2:0] F3_AND = 3'b111;
  localparam logic [2:0] F3_LW  = 3'b010;
  localparam logic [2:0] F3_SW  = 3'b010;
  localparam logic [2:0] F3_BEQ = 3'b000;
  localparam logic [2:0] F3_BNE = 3'b001;
  localparam logic [2:0] F3_JALR = 3'b000;

  // funct7, bits [31:25]
  localparam logic [6:0] F7_BASE = 7'b0000000;
  localparam logic [6:0] F7_SUB  = 7'b0100000;

  typedef enum logic [1:0] {
    FMT_R = 2'd0,
    FMT_I = 2'd1,
    FMT_S = 2'd2,
    FMT_B = 2'd3
  } fmt_e;

  typedef enum logic [3:0] {
    I_ILLEGAL = 4'd0,
    I_ADD, I_SUB, I_AND, I_OR, I_XOR,
    I_ADDI, I_LW, I_JALR,
    I_SW,
    I_BEQ, I_BNE
  } instr_e;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4
  } alu_op_e;

  typedef enum logic [1:0] {
    WB_ALU = 2'd0,  // ALU result
    WB_MEM = 2'd1,  // loaded word
    WB_PC4 = 2'd2   // link address PC+4
  } wb_sel_e;

  // Everything the datapath needs from one instruction word.
  typedef struct packed {
    instr_e  instr;
    fmt_e    fmt;
    logic    illegal;   // not an RV32I-Lite instruction (includes the all-zeros word)
    ridx_t   rd;
    ridx_t   rs1;
    ridx_t   rs2;
    logic    reg_we;    // writes rd
    logic    alu_imm;   // ALU operand b is the immediate, not rs2
    alu_op_e alu_op;
    wb_sel_e wb_sel;
    logic    mem_re;    // lw
    logic    mem_we;    // sw
    logic    branch;    // beq/bne
    logic    branch_ne; // 1: bne, 0: beq
    logic    jalr;
  } ctrl_t;

endpackage
