// tb_rv32il_decoder: self-checking test of rv32il_decoder.
//
// Decodes the worked encodings of the RV32I-Lite card (addi x1,x0,5 =
// 0x00500093; sw x6,12(x2) = 0x00612623; beq x5,x0,+8 = 0x00028463; ret =
// 0x00008067), the all-zeros HALT word, then many random words. Random
// words are drawn mostly from the six legal opcodes with random funct and
// register fields, so legal, out-of-range-register and bad-funct words all
// occur. The expected result comes from a reference model written as a flat
// table over (opcode, funct3, funct7) in this file.
module tb_rv32il_decoder;
  import rv32il_pkg::*;
  import rv32il_enc_pkg::*;

  logic [31:0] instr;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  rv32il_decoder dut (.instr(instr), .ctrl(ctrl));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model: which instruction a word is, and which register
  // fields it uses.
  function automatic instr_e ref_instr(logic [31:0] w);
    logic [6:0] op; logic [2:0] f3; logic [6:0] f7;
    logic ubad;
    instr_e r;
    op = w[6:0]; f3 = w[14:12]; f7 = w[31:25];
    r = I_ILLEGAL;
    if      (op == 7'h33 && f7 == 7'h00 && f3 == 3'd0) r = I_ADD;
    else if (op == 7'h33 && f7 == 7'h20 && f3 == 3'd0) r = I_SUB;
    else if (op == 7'h33 && f7 == 7'h00 && f3 == 3'd7) r = I_AND;
    else if (op == 7'h33 && f7 == 7'h00 && f3 == 3'd6) r = I_OR;
    else if (op == 7'h33 && f7 == 7'h00 && f3 == 3'd4) r = I_XOR;
    else if (op == 7'h13 && f3 == 3'd0) r = I_ADDI;
    else if (op == 7'h03 && f3 == 3'd2) r = I_LW;
    else if (op == 7'h67 && f3 == 3'd0) r = I_JALR;
    else if (op == 7'h23 && f3 == 3'd2) r = I_SW;
    else if (op == 7'h63 && f3 == 3'd0) r = I_BEQ;
    else if (op == 7'h63 && f3 == 3'd1) r = I_BNE;
    // register fields used by the format must be x0..x7
    case (r)
      I_ADD, I_SUB, I_AND, I_OR, I_XOR: ubad = (w[11:7] > 7) || (w[19:15] > 7) || (w[24:20] > 7);
      I_ADDI, I_LW, I_JALR:             ubad = (w[11:7] > 7) || (w[19:15] > 7);
      I_SW, I_BEQ, I_BNE:               ubad = (w[19:15] > 7) || (w[24:20] > 7);
      default:                          ubad = 1'b0;
    endcase
    return ubad ? I_ILLEGAL : r;
  endfunction

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s instr=%08h got=%0h exp=%0h", what, instr, got, exp);
    end
  endtask

  task automatic check_word(logic [31:0] w);
    instr_e e;
    instr = w;
    #1;
    e = ref_instr(w);
    chk("instr", 32'(ctrl.instr), 32'(e));
    chk("illegal", 32'(ctrl.illegal), 32'(e == I_ILLEGAL));
    chk("reg_we", 32'(ctrl.reg_we), 32'(e inside {I_ADD, I_SUB, I_AND, I_OR, I_XOR, I_ADDI, I_LW, I_JALR}));
    chk("mem_re", 32'(ctrl.mem_re), 32'(e == I_LW));
    chk("mem_we", 32'(ctrl.mem_we), 32'(e == I_SW));
    chk("branch", 32'(ctrl.branch), 32'(e inside {I_BEQ, I_BNE}));
    chk("branch_ne", 32'(ctrl.branch_ne), 32'(e == I_BNE));
    chk("jalr", 32'(ctrl.jalr), 32'(e == I_JALR));
    if (e != I_ILLEGAL) begin
      chk("alu_imm", 32'(ctrl.alu_imm), 32'(e inside {I_ADDI, I_LW, I_JALR, I_SW}));
      chk("rd",  32'(ctrl.rd),  32'(w[9:7]));
      chk("rs1", 32'(ctrl.rs1), 32'(w[17:15]));
      chk("rs2", 32'(ctrl.rs2), 32'(w[22:20]));
      case (e)
        I_SUB: chk("alu_op", 32'(ctrl.alu_op), 32'(ALU_SUB));
        I_AND: chk("alu_op", 32'(ctrl.alu_op), 32'(ALU_AND));
        I_OR:  chk("alu_op", 32'(ctrl.alu_op), 32'(ALU_OR));
        I_XOR: chk("alu_op", 32'(ctrl.alu_op), 32'(ALU_XOR));
        I_ADD, I_ADDI, I_LW, I_JALR, I_SW: chk("alu_op", 32'(ctrl.alu_op), 32'(ALU_ADD));
        default: ;
      endcase
      if (e == I_LW)   chk("wb_sel", 32'(ctrl.wb_sel), 32'(WB_MEM));
      if (e == I_JALR) chk("wb_sel", 32'(ctrl.wb_sel), 32'(WB_PC4));
      if (e inside {I_ADD, I_SUB, I_AND, I_OR, I_XOR, I_ADDI})
        chk("wb_sel", 32'(ctrl.wb_sel), 32'(WB_ALU));
      case (e)
        I_SW: chk("fmt", 32'(ctrl.fmt), 32'(FMT_S));
        I_BEQ, I_BNE: chk("fmt", 32'(ctrl.fmt), 32'(FMT_B));
        I_ADDI, I_LW, I_JALR: chk("fmt", 32'(ctrl.fmt), 32'(FMT_I));
        default: chk("fmt", 32'(ctrl.fmt), 32'(FMT_R));
      endcase
    end
  endtask

  localparam logic [6:0] OPS [6] = '{7'h33, 7'h13, 7'h03, 7'h23, 7'h63, 7'h67};
  int n_legal = 0;

  initial begin
    // Worked examples printed on the card
    instr = 32'h00500093; #1;
    chk("addi x1,x0,5 instr", 32'(ctrl.instr), 32'(I_ADDI));
    chk("addi rd", 32'(ctrl.rd), 1); chk("addi rs1", 32'(ctrl.rs1), 0);
    instr = 32'h00612623; #1;
    chk("sw x6,12(x2) instr", 32'(ctrl.instr), 32'(I_SW));
    chk("sw rs1", 32'(ctrl.rs1), 2); chk("sw rs2", 32'(ctrl.rs2), 6);
    instr = 32'h00028463; #1;
    chk("beq x5,x0,8 instr", 32'(ctrl.instr), 32'(I_BEQ));
    chk("beq rs1", 32'(ctrl.rs1), 5); chk("beq rs2", 32'(ctrl.rs2), 0);
    instr = 32'h00008067; #1;
    chk("ret instr", 32'(ctrl.instr), 32'(I_JALR));
    chk("ret rs1", 32'(ctrl.rs1), 1); chk("ret rd", 32'(ctrl.rd), 0);
    instr = 32'h00000013; #1;
    chk("nop instr", 32'(ctrl.instr), 32'(I_ADDI));
    instr = 32'h0; #1;
    chk("zero word illegal", 32'(ctrl.illegal), 1);
    chk("zero word no write", 32'(ctrl.reg_we | ctrl.mem_we), 0);
    // encoder cross-check against the card's worked hex
    chk("enc addi", addi_(1, 0, 5), 32'h00500093);
    chk("enc sw", sw_(6, 12, 2), 32'h00612623);
    chk("enc beq", beq_(5, 0, 8), 32'h00028463);
    chk("enc ret", jalr_(0, 1, 0), 32'h00008067);

    check_word(32'h0);
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] w;
      w = $urandom;
      if (i % 8 != 0) w[6:0] = OPS[$urandom_range(0, 5)];
      if (i % 2 == 0) begin  // bias towards legal registers and funct7
        w[11:10] = 0; w[19:18] = 0; w[24:23] = 0;
        w[31:25] = ($urandom_range(0, 3) == 0) ? 7'h20 : 7'h00;
      end
      if (ref_instr(w) != I_ILLEGAL) n_legal++;
      check_word(w);
    end
    checks++;
    if (n_legal < 1000) begin failures++; $display("FAIL too few legal words %0d", n_legal); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
