// cbm_decoder: instruction decoder for the CBM extension and the RV32I ALU subset.
//
// CBM computation instructions use the standard R- and I-type layouts with the
// 2-bit encoding selector es in instr[31:30]:
//   register-register  es | 00000 | rs2 | rs1 | funct3 | rd | 0001011
//   register-immediate es | imm[9:0]    | rs1 | funct3 | rd | 0101011
// funct3 selects and(0) or(1) xor(2) sll(3) srl(4). Both operands of the
// register form are decoded; the immediate form decodes rs1 only. es[1] asks
// for the result to be encoded, es[0] for the PRG refresh of its 16 MSBs.
// PRG management instructions use opcode 1011011 with a 2-bit immediate in
// instr[26:25]: cbm.prg imm (funct3 0), cbm.s2r rd, imm (funct3 1) and
// cbm.r2s rs1, imm (funct3 2). The opcodes, the field positions and the
// funct3 values follow the CBM encoding. The 10-bit immediate of the
// logical forms is sign-extended as RV32I does, and the shift forms use
// imm[4:0] with imm[9:5] required zero; both are this design's choices. The
// ordinary instructions accepted are lui and the OP / OP-IMM groups; anything
// else is flagged illegal and writes nothing. The decoder also reports which
// source registers are read so that the gated register file enables only
// those ports. Purely combinational; the core uses it in the fetch stage.
module cbm_decoder
  import cbm_pkg::*;
(
  input  logic [31:0] instr_i,
  output ctrl_t       ctrl_o
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [6:0] funct7;
  logic [1:0] es;

  assign opcode = instr_i[6:0];
  assign funct3 = instr_i[14:12];
  assign funct7 = instr_i[31:25];
  assign es     = instr_i[31:30];

  function automatic logic cbm_f3_ok(logic [2:0] f3);
    return f3 <= CBM_F3_SRL;
  endfunction

  function automatic alu_op_e cbm_alu_op(logic [2:0] f3);
    unique case (f3)
      CBM_F3_AND: return ALU_AND;
      CBM_F3_OR:  return ALU_OR;
      CBM_F3_XOR: return ALU_XOR;
      CBM_F3_SLL: return ALU_SLL;
      default:    return ALU_SRL;
    endcase
  endfunction

  function automatic alu_op_e rv_alu_op(logic [2:0] f3, logic alt);
    unique case (f3)
      3'b000:  return alt ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return alt ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    ctrl_o        = '0;
    ctrl_o.alu_op = ALU_ADD;
    ctrl_o.prg_op = PRG_RESEED;
    ctrl_o.rd     = instr_i[11:7];
    ctrl_o.rs1    = instr_i[19:15];
    ctrl_o.rs2    = instr_i[24:20];

    unique case (opcode)
      OPC_CBM_RR: begin
        if (cbm_f3_ok(funct3) && instr_i[29:25] == 5'b0) begin
          ctrl_o.legal       = 1'b1;
          ctrl_o.rf_we       = 1'b1;
          ctrl_o.rs1_en      = 1'b1;
          ctrl_o.rs2_en      = 1'b1;
          ctrl_o.alu_op      = cbm_alu_op(funct3);
          ctrl_o.cbm_opa_sel = 1'b1;
          ctrl_o.cbm_opb_sel = 1'b1;
          ctrl_o.cbm_enc_sel = es;
        end
      end
      OPC_CBM_RI: begin
        if (cbm_f3_ok(funct3) &&
            !((funct3 == CBM_F3_SLL || funct3 == CBM_F3_SRL) && instr_i[29:25] != 5'b0)) begin
          ctrl_o.legal       = 1'b1;
          ctrl_o.rf_we       = 1'b1;
          ctrl_o.rs1_en      = 1'b1;
          ctrl_o.alu_op      = cbm_alu_op(funct3);
          ctrl_o.opb_imm     = 1'b1;
          ctrl_o.imm         = {{22{instr_i[29]}}, instr_i[29:20]};
          ctrl_o.cbm_opa_sel = 1'b1;
          ctrl_o.cbm_enc_sel = es;
        end
      end
      OPC_CBM_PRG: begin
        ctrl_o.prg_part = instr_i[26:25];
        if (instr_i[31:27] == 5'b0 && instr_i[24:20] == 5'b0) begin
          unique case (funct3)
            PRG_F3_PRG: if (instr_i[19:15] == 5'b0 && instr_i[11:7] == 5'b0) begin
              ctrl_o.legal     = 1'b1;
              ctrl_o.prg_op_en = 1'b1;
              ctrl_o.prg_op    = prg_op_e'(instr_i[26:25]);
            end
            PRG_F3_S2R: if (instr_i[19:15] == 5'b0) begin
              ctrl_o.legal   = 1'b1;
              ctrl_o.rf_we   = 1'b1;
              ctrl_o.prg_s2r = 1'b1;
            end
            PRG_F3_R2S: if (instr_i[11:7] == 5'b0) begin
              ctrl_o.legal   = 1'b1;
              ctrl_o.rs1_en  = 1'b1;
              ctrl_o.prg_r2s = 1'b1;
            end
            default: ;
          endcase
        end
      end
      OPC_OP: begin
        if (funct7 == 7'b0 || (funct7 == 7'b0100000 && (funct3 == 3'b000 || funct3 == 3'b101))) begin
          ctrl_o.legal  = 1'b1;
          ctrl_o.rf_we  = 1'b1;
          ctrl_o.rs1_en = 1'b1;
          ctrl_o.rs2_en = 1'b1;
          ctrl_o.alu_op = rv_alu_op(funct3, funct7[5]);
        end
      end
      OPC_OP_IMM: begin
        if (funct3 == 3'b001 ? funct7 == 7'b0 :
            funct3 == 3'b101 ? (funct7 == 7'b0 || funct7 == 7'b0100000) : 1'b1) begin
          ctrl_o.legal   = 1'b1;
          ctrl_o.rf_we   = 1'b1;
          ctrl_o.rs1_en  = 1'b1;
          ctrl_o.opb_imm = 1'b1;
          ctrl_o.imm     = {{20{instr_i[31]}}, instr_i[31:20]};
          ctrl_o.alu_op  = rv_alu_op(funct3, funct3 == 3'b101 && funct7[5]);
        end
      end
      OPC_LUI: begin
        ctrl_o.legal   = 1'b1;
        ctrl_o.rf_we   = 1'b1;
        ctrl_o.lui     = 1'b1;
        ctrl_o.opb_imm = 1'b1;
        ctrl_o.imm     = {instr_i[31:12], 12'b0};
      end
      default: ;
    endcase

    // Writes to x0 are dropped; illegal instructions do nothing.
    if (!ctrl_o.legal) begin
      ctrl_o.rf_we  = 1'b0;
      ctrl_o.rs1_en = 1'b0;
      ctrl_o.rs2_en = 1'b0;
    end
    if (ctrl_o.rd == 5'b0) ctrl_o.rf_we = 1'b0;
  end

endmodule
