// cbm_alu_wrap: the ALU wrapped by the code-based masking circuit.
//
// Operand path: each operand enters a demultiplexer. With its select high
// (cbm_opa_sel / cbm_opb_sel, set while a CBM computation instruction
// executes) the operand is steered into a decoder and the decoded value is
// chosen by the matching multiplexer; with the select low the operand takes
// the bypass leg and the decoder input is held at zero, so the decoder does
// not toggle during ordinary instructions. operand_b of a CBM immediate
// instruction is the immediate and is not decoded (cbm_opb_sel low).
// Result path: a demultiplexer/multiplexer pair selected by cbm_enc_sel[0]
// optionally XORs the 16 PRG bits into the 16 MSBs of the ALU result; a second
// pair selected by cbm_enc_sel[1] optionally passes the result through the
// encoder. The two select bits come from the 2-bit es field of the
// instruction. The four demultiplexer/multiplexer pairs, the two decoders, the
// encoder and the 16-bit XOR follow the published wrapper; realising each
// demultiplexer as AND gating (the unused leg is forced to zero) is this
// design's choice. Purely combinational: a CBM operation completes in the
// execute cycle together with the ALU.
module cbm_alu_wrap
  import cbm_pkg::*;
(
  input  alu_op_e     alu_op_i,
  input  logic [31:0] operand_a_i,
  input  logic [31:0] operand_b_i,
  input  logic        cbm_opa_sel_i,
  input  logic        cbm_opb_sel_i,
  input  logic [1:0]  cbm_enc_sel_i,
  input  logic [15:0] prg_rnd_i,
  output logic [31:0] result_o
);

  // Demultiplexer: the leg that is not selected is driven to zero.
  function automatic logic [63:0] demux(logic [31:0] d, logic sel);
    return {d & {32{sel}}, d & {32{~sel}}};   // {leg 1, leg 0}
  endfunction

  logic [31:0] a_leg0, a_leg1, a_dec, alu_a;
  logic [31:0] b_leg0, b_leg1, b_dec, alu_b;
  logic [31:0] alu_res;
  logic [31:0] x_leg0, x_leg1, x_res;
  logic [31:0] e_leg0, e_leg1, e_res;

  // Operand a
  assign {a_leg1, a_leg0} = demux(operand_a_i, cbm_opa_sel_i);
  cbm_codec u_dec_a (.x_i(a_leg1), .y_o(a_dec));
  assign alu_a = cbm_opa_sel_i ? a_dec : a_leg0;

  // Operand b
  assign {b_leg1, b_leg0} = demux(operand_b_i, cbm_opb_sel_i);
  cbm_codec u_dec_b (.x_i(b_leg1), .y_o(b_dec));
  assign alu_b = cbm_opb_sel_i ? b_dec : b_leg0;

  cbm_alu u_alu (
    .op_i        (alu_op_i),
    .operand_a_i (alu_a),
    .operand_b_i (alu_b),
    .result_o    (alu_res)
  );

  // Optional refresh of the 16 MSBs with PRG output
  assign {x_leg1, x_leg0} = demux(alu_res, cbm_enc_sel_i[0]);
  assign x_res = cbm_enc_sel_i[0] ? (x_leg1 ^ {prg_rnd_i, 16'h0000}) : x_leg0;

  // Optional final encoding
  assign {e_leg1, e_leg0} = demux(x_res, cbm_enc_sel_i[1]);
  cbm_codec u_enc (.x_i(e_leg1), .y_o(e_res));
  assign result_o = cbm_enc_sel_i[1] ? e_res : e_leg0;

endmodule
