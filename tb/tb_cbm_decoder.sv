// tb_cbm_decoder: decodes hand-assembled CBM and RV32I instructions and checks
// the control word: operation, register fields, read enables, decode/encode
// selects, immediates, PRG controls, and rejection of malformed encodings.
module tb_cbm_decoder;
  import cbm_pkg::*;
  import cbm_asm_pkg::*;

  logic [31:0] instr;
  ctrl_t c;
  int checks = 0, failures = 0;

  cbm_decoder dut (.instr_i(instr), .ctrl_o(c));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (instr %h): got %0h expected %0h", what, instr, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e cops [5] = '{ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL};
    // register-register CBM
    for (int f = 0; f < 5; f++) for (int es = 0; es < 4; es++) begin
      automatic int rd = 1 + $urandom % 31, rs1 = $urandom % 32, rs2 = $urandom % 32;
      instr = cbm_rr(f, rd, rs1, rs2, es); #1;
      check("rr legal", c.legal, 1);
      check("rr op", c.alu_op, cops[f]);
      check("rr rd", c.rd, rd); check("rr rs1", c.rs1, rs1); check("rr rs2", c.rs2, rs2);
      check("rr we", c.rf_we, 1);
      check("rr reads", {c.rs1_en, c.rs2_en}, 2'b11);
      check("rr dec", {c.cbm_opa_sel, c.cbm_opb_sel}, 2'b11);
      check("rr es", c.cbm_enc_sel, es);
      check("rr not imm", c.opb_imm, 0);
    end
    // register-immediate CBM
    for (int f = 0; f < 5; f++) for (int es = 0; es < 4; es++) begin
      automatic int imm = (f >= 3) ? $urandom % 32 : $urandom % 1024;
      automatic longint sext = (imm >= 512) ? (imm - 1024) : imm;
      instr = cbm_ri(f, 5, 6, imm, es); #1;
      check("ri legal", c.legal, 1);
      check("ri op", c.alu_op, cops[f]);
      check("ri imm", c.imm, {32'h0, 32'(sext)});
      check("ri opb_imm", c.opb_imm, 1);
      check("ri reads", {c.rs1_en, c.rs2_en}, 2'b10);
      check("ri dec", {c.cbm_opa_sel, c.cbm_opb_sel}, 2'b10);
      check("ri es", c.cbm_enc_sel, es);
    end
    // malformed: funct3 5..7, nonzero bits 29:25 in the register form, big shift
    instr = cbm_rr(5, 1, 2, 3, 0); #1; check("bad funct3", c.legal, 0);
    instr = cbm_rr(C_AND, 1, 2, 3, 0) | 32'h0200_0000; #1; check("bad rr field", c.legal, 0);
    instr = cbm_ri(C_SLL, 1, 2, 32, 0); #1; check("bad shamt", c.legal, 0);
    // PRG management
    for (int op = 0; op < 4; op++) begin
      instr = cbm_prg(op); #1;
      check("prg legal", c.legal, 1); check("prg en", c.prg_op_en, 1);
      check("prg op", c.prg_op, op); check("prg no write", c.rf_we, 0);
      check("prg no read", {c.rs1_en, c.rs2_en}, 0);
    end
    instr = cbm_s2r(9, 2); #1;
    check("s2r", {c.legal, c.prg_s2r, c.rf_we, c.rs1_en}, 4'b1110);
    check("s2r rd", c.rd, 9); check("s2r part", c.prg_part, 2);
    instr = cbm_r2s(11, 3); #1;
    check("r2s", {c.legal, c.prg_r2s, c.rf_we, c.rs1_en}, 4'b1101);
    check("r2s rs1", c.rs1, 11); check("r2s part", c.prg_part, 3);
    instr = cbm_prg(0) | 32'h0000_7000; #1; check("bad prg funct3", c.legal, 0);
    // RV32I
    instr = rv_xor(3, 4, 5); #1;
    check("xor", {c.legal, c.rs1_en, c.rs2_en, c.cbm_opa_sel, c.cbm_opb_sel}, 5'b11100);
    check("xor op", c.alu_op, ALU_XOR); check("xor es", c.cbm_enc_sel, 0);
    instr = rv_sub(3, 4, 5); #1; check("sub op", c.alu_op, ALU_SUB);
    instr = addi(7, 8, -3); #1; check("addi imm", c.imm, 32'hFFFF_FFFD); check("addi op", c.alu_op, ALU_ADD);
    instr = i_type(5, 7, 8, 32'h405); #1; check("srai op", c.alu_op, ALU_SRA);
    instr = lui(12, 32'hABCDE000); #1;
    check("lui", {c.legal, c.lui, c.rs1_en}, 3'b110); check("lui imm", c.imm, 32'hABCDE000);
    instr = addi(0, 1, 1); #1; check("write to x0 dropped", c.rf_we, 0);
    instr = 32'h0000_0003; #1; check("load is not supported", c.legal, 0);
    check("illegal reads nothing", {c.rs1_en, c.rs2_en, c.rf_we}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
