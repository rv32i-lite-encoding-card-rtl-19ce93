// rv32il_decoder: instruction decoder for RV32I-Lite.
//
// Purely combinational. The fields sit at the same bit positions in every
// format, so they are sliced unconditionally: opcode [6:0], rd [11:7],
// funct3 [14:12], rs1 [19:15], rs2 [24:20], funct7 [31:25]. The opcode alone
// picks the format (R, I, S or B); funct3, and for R-format funct7, pick the
// instruction. Only funct7 = 0000000 and, with funct3 = 000, 0100000 (sub)
// are legal; the two differ in funct7 bit 5 alone, which becomes the ALU's
// subtract select.
//
// A word is flagged illegal when its opcode, funct3 or funct7 is not one of
// the 11 instructions (the all-zeros word falls here) or when a register
// field the format actually uses names x8..x31, which RV32I-Lite never emits.
// Register fields that hold immediate bits in S and B formats are not
// checked. Flagging out-of-range registers as illegal is this design's own
// choice; an illegal word produces no register or memory write.
//
// Interface: instr (32-bit word) in, ctrl (rv32il_pkg::ctrl_t) out.
module rv32il_decoder
  import rv32il_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl
);

  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  logic [4:0] rd_f, rs1_f, rs2_f;

  assign opcode = instr[6:0];
  assign rd_f   = instr[11:7];
  assign funct3 = instr[14:12];
  assign rs1_f  = instr[19:15];
  assign rs2_f  = instr[24:20];
  assign funct7 = instr[31:25];

  // Register fields above x7 are out of range for RV32I-Lite.
  logic rd_bad, rs1_bad, rs2_bad;
  assign rd_bad  = (32'(rd_f)  >= NREGS);
  assign rs1_bad = (32'(rs1_f) >= NREGS);
  assign rs2_bad = (32'(rs2_f) >= NREGS);

  instr_e instr_id;
  fmt_e   fmt;

  always_comb begin
    instr_id = I_ILLEGAL;
    fmt      = FMT_I;
    unique case (opcode)
      OPC_OP: begin
        fmt = FMT_R;
        if (funct7 == F7_BASE) begin
          unique case (funct3)
            F3_ADD:  instr_id = I_ADD;
            F3_AND:  instr_id = I_AND;
            F3_OR:   instr_id = I_OR;
            F3_XOR:  instr_id = I_XOR;
            default: instr_id = I_ILLEGAL;
          endcase
        end else if (funct7 == F7_SUB && funct3 == F3_ADD) begin
          instr_id = I_SUB;
        end
      end
      OPC_OP_IMM: if (funct3 == F3_ADD)  instr_id = I_ADDI;
      OPC_LOAD:   if (funct3 == F3_LW)   instr_id = I_LW;
      OPC_JALR:   if (funct3 == F3_JALR) instr_id = I_JALR;
      OPC_STORE: begin
        fmt = FMT_S;
        if (funct3 == F3_SW) instr_id = I_SW;
      end
      OPC_BRANCH: begin
        fmt = FMT_B;
        if (funct3 == F3_BEQ)      instr_id = I_BEQ;
        else if (funct3 == F3_BNE) instr_id = I_BNE;
      end
      default: ;
    endcase
  end

  // Registers a format really reads or writes must be x0..x7.
  logic regs_bad;
  always_comb begin
    unique case (fmt)
      FMT_R:   regs_bad = rd_bad | rs1_bad | rs2_bad;
      FMT_I:   regs_bad = rd_bad | rs1_bad;
      default: regs_bad = rs1_bad | rs2_bad;  // S, B
    endcase
  end

  logic illegal;
  assign illegal = (instr_id == I_ILLEGAL) | regs_bad;

  always_comb begin
    ctrl           = '0;
    ctrl.instr     = illegal ? I_ILLEGAL : instr_id;
    ctrl.fmt       = fmt;
    ctrl.illegal   = illegal;
    ctrl.rd        = rd_f[RIDX-1:0];
    ctrl.rs1       = rs1_f[RIDX-1:0];
    ctrl.rs2       = rs2_f[RIDX-1:0];
    ctrl.alu_op    = ALU_ADD;
    ctrl.wb_sel    = WB_ALU;
    if (!illegal) begin
      unique case (instr_id)
        I_ADD:  ctrl.reg_we = 1'b1;
        I_SUB:  begin ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_SUB; end
        I_AND:  begin ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_AND; end
        I_OR:   begin ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_OR;  end
        I_XOR:  begin ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_XOR; end
        I_ADDI: begin ctrl.reg_we = 1'b1; ctrl.alu_imm = 1'b1; end
        I_LW: begin
          ctrl.reg_we  = 1'b1;
          ctrl.alu_imm = 1'b1;
          ctrl.mem_re  = 1'b1;
          ctrl.wb_sel  = WB_MEM;
        end
        I_JALR: begin
          ctrl.reg_we  = 1'b1;
          ctrl.alu_imm = 1'b1;
          ctrl.jalr    = 1'b1;
          ctrl.wb_sel  = WB_PC4;
        end
        I_SW: begin
          ctrl.alu_imm = 1'b1;
          ctrl.mem_we  = 1'b1;
        end
        I_BEQ: ctrl.branch = 1'b1;
        I_BNE: begin ctrl.branch = 1'b1; ctrl.branch_ne = 1'b1; end
        default: ;
      endcase
    end
  end

endmodule
