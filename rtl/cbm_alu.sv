// cbm_alu: integer ALU of the base core, used unchanged inside the CBM wrapper.
//
// It performs the RV32I register/immediate operations: add, sub, shifts
// (sll, srl, sra; the amount is operand_b[4:0]), set-less-than (signed and
// unsigned) and the bitwise and, or, xor. The CBM computation instructions
// use the and, or, xor, sll and srl operations on decoded operands; the
// others serve the ordinary instructions that pass through the wrapper
// undecoded. The base core's own ALU is not reproduced; this is the minimal
// ALU that provides these operations. Purely combinational.
module cbm_alu
  import cbm_pkg::*;
(
  input  alu_op_e     op_i,
  input  logic [31:0] operand_a_i,
  input  logic [31:0] operand_b_i,
  output logic [31:0] result_o
);

  logic [4:0] shamt;
  assign shamt = operand_b_i[4:0];

  always_comb begin
    unique case (op_i)
      ALU_ADD:  result_o = operand_a_i + operand_b_i;
      ALU_SUB:  result_o = operand_a_i - operand_b_i;
      ALU_SLL:  result_o = operand_a_i << shamt;
      ALU_SLT:  result_o = {31'b0, $signed(operand_a_i) < $signed(operand_b_i)};
      ALU_SLTU: result_o = {31'b0, operand_a_i < operand_b_i};
      ALU_XOR:  result_o = operand_a_i ^ operand_b_i;
      ALU_SRL:  result_o = operand_a_i >> shamt;
      ALU_SRA:  result_o = 32'($signed(operand_a_i) >>> shamt);
      ALU_OR:   result_o = operand_a_i | operand_b_i;
      ALU_AND:  result_o = operand_a_i & operand_b_i;
      default:  result_o = '0;
    endcase
  end

endmodule
