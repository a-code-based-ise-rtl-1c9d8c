// cbm_core: execution slice of a RISC-V core extended with the CBM instructions.
//
// Software keeps every Boolean share in registers and memory only in encoded
// form (a "protected-Boolean share", the share times an MDS matrix). A CBM
// computation instruction decodes its register operands, runs an ordinary ALU
// operation on the plain shares, optionally XORs 16 PRG bits into the result
// MSBs and re-encodes the result before it is written back, so plain shares
// exist only inside the combinational execute logic and never in a register.
//
// Two stages, as in a two-stage core:
//   fetch (IF)    instr_i is decoded; the one-hot register-file read selects
//                 of the source registers actually used are computed and
//                 registered together with the decoded control word.
//   execute (EX)  the gated register file delivers the operands, the wrapped
//                 ALU (decoders, ALU, PRG XOR, encoder) or the PRG produces the
//                 result, and the result is written back at the end of the
//                 cycle.
// One instruction can enter per cycle (instr_valid_i); each executes in one
// EX cycle and is reported on wb_* / illegal_o in the cycle after it was
// presented. There are no hazards: a result written at the end of EX is read
// by the next instruction in its own EX cycle.
// Supported: the ten CBM computation instructions, cbm.prg / cbm.s2r /
// cbm.r2s, and the RV32I lui, OP and OP-IMM instructions. Instruction fetch,
// branches, loads/stores, the multiplier, CSRs and compressed instructions of
// the base core are not part of this block; instructions are supplied by the
// environment.
module cbm_core
  import cbm_pkg::*;
#(
  parameter logic [PRG_B-1:0] PRG_SEED_INIT = 100'h0_5EED_C0DE_0123_4567_89AB_CDEF
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // Instruction input (fetch stage)
  input  logic        instr_valid_i,
  input  logic [31:0] instr_i,
  // Execute-stage status
  output logic        ex_valid_o,     // an instruction is in EX this cycle
  output logic        illegal_o,      // ... and it is not supported
  output logic        wb_valid_o,     // register write-back this cycle
  output logic [4:0]  wb_rd_o,
  output logic [31:0] wb_data_o,
  output logic        prg_auto_o      // PRG automatic mode
);

  ctrl_t       ctrl_if, ctrl_q;
  logic        valid_q;
  logic [31:0] rs1_data, rs2_data;
  logic [31:0] op_a, op_b, alu_result, s2r_data, result;
  logic [15:0] prg_rnd;
  logic        cbm_opa_sel, cbm_opb_sel;
  logic [1:0]  cbm_enc_sel;

  // ---------------- fetch stage ----------------
  cbm_decoder u_decoder (
    .instr_i (instr_i),
    .ctrl_o  (ctrl_if)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      valid_q <= 1'b0;
      ctrl_q  <= '0;
    end else begin
      valid_q <= instr_valid_i;
      ctrl_q  <= instr_valid_i ? ctrl_if : '0;
    end
  end

  // ---------------- register file ----------------
  cbm_regfile_rg #(.NREGS(32), .W(32)) u_regfile (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .raddr_a_i (ctrl_if.rs1),
    .ren_a_i   (instr_valid_i && ctrl_if.rs1_en),
    .raddr_b_i (ctrl_if.rs2),
    .ren_b_i   (instr_valid_i && ctrl_if.rs2_en),
    .rdata_a_o (rs1_data),
    .rdata_b_o (rs2_data),
    .we_i      (wb_valid_o),
    .waddr_i   (wb_rd_o),
    .wdata_i   (wb_data_o)
  );

  // ---------------- execute stage ----------------
  assign op_a = ctrl_q.lui     ? '0          : rs1_data;
  assign op_b = ctrl_q.opb_imm ? ctrl_q.imm  : rs2_data;

  assign cbm_opa_sel = valid_q && ctrl_q.cbm_opa_sel;
  assign cbm_opb_sel = valid_q && ctrl_q.cbm_opb_sel;
  assign cbm_enc_sel = valid_q ? ctrl_q.cbm_enc_sel : 2'b00;

  cbm_alu_wrap u_alu_wrap (
    .alu_op_i      (ctrl_q.alu_op),
    .operand_a_i   (op_a),
    .operand_b_i   (op_b),
    .cbm_opa_sel_i (cbm_opa_sel),
    .cbm_opb_sel_i (cbm_opb_sel),
    .cbm_enc_sel_i (cbm_enc_sel),
    .prg_rnd_i     (prg_rnd),
    .result_o      (alu_result)
  );

  cbm_prg #(.SEED_INIT(PRG_SEED_INIT)) u_prg (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .op_valid_i  (valid_q && ctrl_q.prg_op_en),
    .op_i        (ctrl_q.prg_op),
    .r2s_valid_i (valid_q && ctrl_q.prg_r2s),
    .part_i      (ctrl_q.prg_part),
    .r2s_data_i  (rs1_data),
    .s2r_data_o  (s2r_data),
    .rnd_o       (prg_rnd),
    .auto_en_o   (prg_auto_o)
  );

  assign result = ctrl_q.prg_s2r ? s2r_data : alu_result;

  assign ex_valid_o = valid_q;
  assign illegal_o  = valid_q && !ctrl_q.legal;
  assign wb_valid_o = valid_q && ctrl_q.rf_we;
  assign wb_rd_o    = ctrl_q.rd;
  assign wb_data_o  = result;

endmodule
