// tb_cbm_isw_listing: runs the two first-order ISW multiplication
// micro-benchmarks on the CBM execution slice, instruction for instruction,
// at default parameters.
//
// Program 1 uses plain RV32I and/xor on Boolean shares. Its random mask comes
// from the PRG through cbm.or / cbm.srli with es = 3. Program 2 first turns
// the four input shares into protected shares: cbm.or rs, rs, x0 with es = 0
// decodes, and with es = 3 it adds PRG bits to the 16 MSBs and encodes. It
// then multiplies with cbm.and (es = 3) and recombines with plain xor, which
// is valid because the code is linear. Both programs keep the nop spacing of
// the published benchmarks.
//
// The testbench follows the register writes on the write-back outputs and
// checks, against values computed from the random input shares alone:
//   * RV32I: z0 ^ z1 == (x0 ^ x1) & (y0 ^ y1) on all 32 bits;
//   * CBM:   Dec(x5)[15:0] == x0[15:0] for every protected input share, and
//            (Dec(z0) ^ Dec(z1))[15:0] == ((x0 ^ x1) & (y0 ^ y1))[15:0]. The
//            upper half carries PRG noise by construction;
//   * every instruction writes back exactly one cycle after it is presented.
// Instructions are presented at the falling edge. The write-back outputs are
// sampled at the next falling edge, half a cycle after the instruction
// reached ID/EX.
module tb_cbm_isw_listing;
  import cbm_ref_pkg::*;
  import cbm_asm_pkg::*;

  localparam int TRIALS = 40;

  logic        clk = 0, rst_n = 0;
  logic        instr_valid;
  logic [31:0] instr;
  logic        ex_valid, illegal, wb_valid, prg_auto;
  logic [4:0]  wb_rd;
  logic [31:0] wb_data;

  cbm_core dut (
    .clk_i(clk), .rst_ni(rst_n),
    .instr_valid_i(instr_valid), .instr_i(instr),
    .ex_valid_o(ex_valid), .illegal_o(illegal),
    .wb_valid_o(wb_valid), .wb_rd_o(wb_rd), .wb_data_o(wb_data),
    .prg_auto_o(prg_auto)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // instruction stream, played by one loop
  logic [31:0] prog[$];
  logic [31:0] rf [32];

  function automatic void li(int rd, logic [31:0] v);
    logic [31:0] hi = v + 32'h800;
    prog.push_back(lui(rd, {hi[31:12], 12'h0}));
    prog.push_back(addi(rd, rd, int'($signed(v[11:0]))));
  endfunction

  // run the stream; one write-back per instruction, one cycle later
  task automatic run();
    logic prev_valid = 0;
    logic [31:0] prev_instr = '0;
    for (int i = 0; i <= prog.size(); i++) begin
      @(negedge clk);
      checks++;
      if (ex_valid !== prev_valid || illegal !== 1'b0) begin
        failures++;
        $display("FAIL timing: instruction %h not in ID/EX one cycle later", prev_instr);
      end
      if (wb_valid) rf[wb_rd] = wb_data;
      prev_valid = i < prog.size();
      prev_instr = prev_valid ? prog[i] : '0;
      instr_valid = prev_valid;
      instr = prev_instr;
    end
    prog.delete();
  endtask

  logic [31:0] x0, x1, y0, y1, m;

  function automatic logic [31:0] lo16(logic [31:0] v);
    return {16'h0, v[15:0]};
  endfunction

  initial begin
    instr_valid = 0; instr = '0;
    foreach (rf[i]) rf[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    for (int t = 0; t < TRIALS; t++) begin
      x0 = $urandom; x1 = $urandom; y0 = $urandom; y1 = $urandom; m = $urandom;

      // ---- program 1: standard RV32I instructions ----
      li(5, x0); li(12, x1); li(6, y0); li(13, y1); li(31, m);
      prog.push_back(nop());
      prog.push_back(cbm_rr(C_OR, 31, 31, 0, 3));
      prog.push_back(cbm_ri(C_SRL, 31, 31, 16, 3));
      prog.push_back(nop());
      prog.push_back(rv_and(20, 5, 6));    prog.push_back(nop());
      prog.push_back(rv_xor(20, 20, 31));  prog.push_back(nop());
      prog.push_back(rv_and(21, 5, 13));   prog.push_back(nop());
      prog.push_back(rv_xor(21, 21, 31));  prog.push_back(nop());
      prog.push_back(rv_and(22, 12, 6));   prog.push_back(nop());
      prog.push_back(rv_xor(21, 21, 22));  prog.push_back(nop());
      prog.push_back(rv_and(23, 12, 13));  prog.push_back(nop());
      prog.push_back(rv_xor(21, 21, 23));
      repeat (4) prog.push_back(nop());
      run();
      check("RV32I ISW z0^z1", rf[20] ^ rf[21], (x0 ^ x1) & (y0 ^ y1));
      check("RV32I ISW z0 masked", rf[20], (x0 & y0) ^ rf[31]);

      // ---- program 2: CBM instructions ----
      li(5, x0); li(12, x1); li(6, y0); li(13, y1); li(31, m);
      prog.push_back(nop());
      prog.push_back(cbm_rr(C_OR, 5, 5, 0, 0));   prog.push_back(cbm_rr(C_OR, 5, 5, 0, 3));
      prog.push_back(cbm_rr(C_OR, 6, 6, 0, 0));   prog.push_back(cbm_rr(C_OR, 6, 6, 0, 3));
      prog.push_back(cbm_rr(C_OR, 12, 12, 0, 0)); prog.push_back(cbm_rr(C_OR, 12, 12, 0, 3));
      prog.push_back(cbm_rr(C_OR, 13, 13, 0, 0)); prog.push_back(cbm_rr(C_OR, 13, 13, 0, 3));
      prog.push_back(cbm_rr(C_OR, 31, 31, 0, 3));
      prog.push_back(cbm_ri(C_SRL, 31, 31, 16, 3));
      prog.push_back(cbm_rr(C_AND, 20, 5, 6, 3));   prog.push_back(rv_xor(20, 20, 31));
      prog.push_back(nop());
      prog.push_back(cbm_rr(C_AND, 21, 5, 13, 3));  prog.push_back(rv_xor(21, 21, 31));
      prog.push_back(nop());
      prog.push_back(cbm_rr(C_AND, 22, 12, 6, 3));  prog.push_back(rv_xor(21, 21, 22));
      prog.push_back(nop());
      prog.push_back(cbm_rr(C_AND, 23, 12, 13, 3)); prog.push_back(rv_xor(21, 21, 23));
      prog.push_back(nop());
      // read the result back in plain form (decode only)
      prog.push_back(cbm_rr(C_OR, 24, 20, 0, 0));
      prog.push_back(cbm_rr(C_OR, 25, 21, 0, 0));
      run();
      check("protected x0", lo16(dec(rf[5])), lo16(x0));
      check("protected x1", lo16(dec(rf[12])), lo16(x1));
      check("protected y0", lo16(dec(rf[6])), lo16(y0));
      check("protected y1", lo16(dec(rf[13])), lo16(y1));
      check("decoded z0", rf[24], dec(rf[20]));
      check("CBM ISW z0^z1", lo16(rf[24] ^ rf[25]), lo16((x0 ^ x1) & (y0 ^ y1)));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
