// tb_cbm_prg: drives random PRG operations, seed writes and state reads, and
// compares the state slices and the 16-bit output every cycle with a
// cycle-level reference built on the reference Keccak round. Also checks
// directed cases: state after reset, one update per cycle in automatic mode,
// no update while automatic mode is off, a manual step, and reseeding.
module tb_cbm_prg;
  import cbm_pkg::*;
  import cbm_ref_pkg::*;

  localparam logic [99:0] SEED0 = 100'h0_5EED_C0DE_0123_4567_89AB_CDEF;

  logic clk = 0, rst_n = 0;
  logic op_valid, r2s_valid;
  prg_op_e op;
  logic [1:0] part;
  logic [31:0] r2s_data, s2r_data;
  logic [15:0] rnd;
  logic auto_en;
  int checks = 0, failures = 0;

  logic [99:0] m_state, m_seed;
  int          m_round;
  logic        m_auto;

  cbm_prg dut (
    .clk_i(clk), .rst_ni(rst_n), .op_valid_i(op_valid), .op_i(op),
    .r2s_valid_i(r2s_valid), .part_i(part), .r2s_data_i(r2s_data),
    .s2r_data_o(s2r_data), .rnd_o(rnd), .auto_en_o(auto_en));

  always #5 clk = ~clk;

  task automatic check(string what, logic [99:0] got, logic [99:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] slice(logic [99:0] s, logic [1:0] p);
    return p == 2'd3 ? {28'b0, s[99:96]} : s[32*p +: 32];
  endfunction

  // reference update for the operation presented this cycle
  task automatic model_step();
    logic [99:0] nxt_state = m_state;
    int          nxt_round = m_round;
    if (op_valid && op == PRG_RESEED) begin
      nxt_state = m_seed; nxt_round = 0;
    end else if (m_auto || (op_valid && op == PRG_STEP)) begin
      nxt_state = keccak_round(m_state, m_round); nxt_round = (m_round + 1) % 16;
    end
    if (op_valid && op == PRG_AUTO_OFF) m_auto = 1'b0;
    if (op_valid && op == PRG_AUTO_ON)  m_auto = 1'b1;
    if (r2s_valid) begin
      if (part == 2'd3) m_seed[99:96] = r2s_data[3:0];
      else              m_seed[32*part +: 32] = r2s_data;
    end
    m_state = nxt_state; m_round = nxt_round;
  endtask

  task automatic compare();
    check("rnd", 100'(rnd), 100'(m_state[99:84]));
    check("s2r", 100'(s2r_data), 100'(slice(m_state, part)));
    check("auto", 100'(auto_en), 100'(m_auto));
  endtask

  task automatic cycle();
    @(posedge clk); model_step();
    #1; compare();
  endtask

  task automatic idle();
    op_valid = 0; r2s_valid = 0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r0;
    idle(); op = PRG_RESEED; part = 0; r2s_data = 0;
    m_state = SEED0; m_seed = SEED0; m_round = 0; m_auto = 1;
    #12 rst_n = 1;
    // after reset, before the first clock edge
    #1;
    check("reset state low slice", 100'(s2r_data), 100'(SEED0[31:0]));
    // automatic mode: changes every cycle
    for (int i = 0; i < 20; i++) cycle();
    // switch auto off, the output must hold
    op_valid = 1; op = PRG_AUTO_OFF; cycle(); idle();
    r0 = rnd;
    for (int i = 0; i < 5; i++) cycle();
    check("held while auto off", 100'(rnd), 100'(r0));
    // manual step
    op_valid = 1; op = PRG_STEP; cycle(); idle();
    check("manual step changes output", 100'(rnd != r0), 100'(1));
    // write a seed and reseed
    for (int p = 0; p < 4; p++) begin
      r2s_valid = 1; part = 2'(p); r2s_data = $urandom; cycle();
    end
    idle();
    op_valid = 1; op = PRG_RESEED; cycle(); idle();
    for (int p = 0; p < 4; p++) begin part = 2'(p); cycle(); end
    op_valid = 1; op = PRG_AUTO_ON; cycle(); idle();
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      op_valid  = ($urandom % 4) == 0;
      op        = prg_op_e'($urandom % 4);
      r2s_valid = ($urandom % 5) == 0;
      part      = 2'($urandom);
      r2s_data  = $urandom;
      cycle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
