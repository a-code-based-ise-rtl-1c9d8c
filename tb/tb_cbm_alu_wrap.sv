// tb_cbm_alu_wrap: checks the wrapped ALU for every combination of the
// operand-decode selects and the two encoding-selector bits, using the
// reference codec (matrix product) and reference ALU:
//   result = [Enc] ( ALU([Dec] a, [Dec] b) [^ rnd << 16] )
// Also checks that a protected share refreshed through x0 still decodes to
// the same low half, and that the refresh only touches the 16 MSBs.
module tb_cbm_alu_wrap;
  import cbm_pkg::*;
  import cbm_ref_pkg::*;

  alu_op_e op;
  logic [31:0] a, b, y;
  logic sa, sb;
  logic [1:0] es;
  logic [15:0] rnd;
  int checks = 0, failures = 0;

  cbm_alu_wrap dut (
    .alu_op_i(op), .operand_a_i(a), .operand_b_i(b),
    .cbm_opa_sel_i(sa), .cbm_opb_sel_i(sb), .cbm_enc_sel_i(es),
    .prg_rnd_i(rnd), .result_o(y));

  function automatic rop_e ref_op(alu_op_e o);
    case (o)
      ALU_AND: return R_AND; ALU_OR: return R_OR; ALU_XOR: return R_XOR;
      ALU_SLL: return R_SLL; ALU_SRL: return R_SRL; ALU_ADD: return R_ADD;
      default: return R_SUB;
    endcase
  endfunction

  function automatic logic [31:0] expected();
    logic [31:0] da, db, r;
    da = sa ? dec(a) : a;
    db = sb ? dec(b) : b;
    r  = alu(ref_op(op), da, db);
    if (es[0]) r = r ^ {rnd, 16'h0};
    if (es[1]) r = enc(r);
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops [7] = '{ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_ADD, ALU_SUB};
    for (int n = 0; n < 4000; n++) begin
      op  = ops[$urandom % 7];
      a   = $urandom; b = $urandom; rnd = 16'($urandom);
      sa  = 1'($urandom); sb = 1'($urandom); es = 2'($urandom);
      #1;
      checks++;
      if (y !== expected()) begin
        failures++;
        $display("FAIL op=%s sa=%b sb=%b es=%b a=%h b=%h -> %h exp %h", op.name(), sa, sb, es, a, b, y, expected());
      end
    end
    // refresh: cbm.xor with x0 (operand 0), es = 3; Boolean share in the low half
    for (int n = 0; n < 200; n++) begin
      logic [31:0] share;
      share = {16'($urandom), 16'($urandom)};
      op = ALU_XOR; a = enc(share); b = 32'h0; sa = 1; sb = 1; es = 2'b11; rnd = 16'($urandom); #1;
      checks++;
      if (dec(y) !== (share ^ {rnd, 16'h0}) || dec(y) [15:0] !== share[15:0]) begin
        failures++; $display("FAIL refresh %h -> %h", share, dec(y));
      end
    end
    // bypass: no selects, plain ALU
    op = ALU_ADD; a = 32'd5; b = 32'd7; sa = 0; sb = 0; es = 0; #1; checks++;
    if (y !== 32'd12) begin failures++; $display("FAIL bypass add"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
