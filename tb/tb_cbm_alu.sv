// tb_cbm_alu: every ALU operation on corner and random operands against the
// RV32I reference semantics.
module tb_cbm_alu;
  import cbm_pkg::*;
  import cbm_ref_pkg::*;

  alu_op_e op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  cbm_alu dut (.op_i(op), .operand_a_i(a), .operand_b_i(b), .result_o(y));

  function automatic rop_e ref_op(alu_op_e o);
    case (o)
      ALU_ADD: return R_ADD;   ALU_SUB: return R_SUB;   ALU_SLL: return R_SLL;
      ALU_SLT: return R_SLT;   ALU_SLTU: return R_SLTU; ALU_XOR: return R_XOR;
      ALU_SRL: return R_SRL;   ALU_SRA: return R_SRA;   ALU_OR: return R_OR;
      default: return R_AND;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_001F};
    for (int o = 0; o <= int'(ALU_AND); o++) begin
      op = alu_op_e'(o);
      foreach (corner[i]) foreach (corner[j]) begin
        a = corner[i]; b = corner[j]; #1;
        checks++;
        if (y !== alu(ref_op(op), a, b)) begin
          failures++; $display("FAIL %s %h %h -> %h", op.name(), a, b, y);
        end
      end
      for (int n = 0; n < 300; n++) begin
        a = $urandom; b = $urandom; #1;
        checks++;
        if (y !== alu(ref_op(op), a, b)) begin
          failures++; $display("FAIL %s %h %h -> %h", op.name(), a, b, y);
        end
      end
    end
    // a few hand-worked values
    op = ALU_SRA; a = 32'h8000_0010; b = 32'd4; #1; checks++;
    if (y !== 32'hF800_0001) begin failures++; $display("FAIL sra"); end
    op = ALU_SLT; a = 32'hFFFF_FFFF; b = 32'd0; #1; checks++;
    if (y !== 32'd1) begin failures++; $display("FAIL slt"); end
    op = ALU_SLTU; #1; checks++;
    if (y !== 32'd0) begin failures++; $display("FAIL sltu"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
