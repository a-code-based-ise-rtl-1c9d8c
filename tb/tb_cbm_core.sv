// tb_cbm_core: end-to-end test of the CBM execution slice at its default
// parameters.
//
// A cycle-level reference model (register array, PRG state, seed, round index
// and automatic-mode flag, reference codec and Keccak round) executes the same
// instruction stream and every write-back is compared with it, including the
// cycle in which it appears (one cycle after the instruction is presented).
// Phases:
//   1. directed PRG management: auto off, manual step, step ignored while auto
//      is on, seed write (r2s), reseed, state read (s2r), auto on;
//   2. first-order ISW multiplication with CBM instructions on protected
//      shares, checked by decoding the result shares and recombining them;
//   3. the same multiplication with plain RV32I instructions on Boolean shares;
//   4. a random mix of CBM, PRG and RV32I instructions, bubbles and illegal
//      words.
// Every mechanism of the design is counted and a mechanism that never
// occurred counts as a failure.
module tb_cbm_core;
  import cbm_ref_pkg::*;
  import cbm_asm_pkg::*;

  localparam logic [99:0] SEED0 = 100'h0_5EED_C0DE_0123_4567_89AB_CDEF;

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
    .prg_auto_o(prg_auto));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  // ---------------- reference model ----------------
  logic [31:0] m_reg [32];
  logic [99:0] m_state, m_seed;
  int          m_round;
  logic        m_auto;
  logic        m_ex_valid;          // instruction in EX
  logic [31:0] m_ex_instr;
  logic        m_prev_we;           // previous EX wrote m_prev_rd
  int          m_prev_rd;

  // mechanism counters
  typedef enum int {
    M_CBM_AND, M_CBM_OR, M_CBM_XOR, M_CBM_SLL, M_CBM_SRL,
    M_CBM_IMM, M_ES0, M_ES1, M_ES2, M_ES3, M_REFRESH_X0,
    M_PRG_RESEED, M_PRG_STEP, M_PRG_STEP_IGNORED, M_PRG_AUTO_OFF, M_PRG_AUTO_ON,
    M_S2R, M_R2S, M_RV_OP, M_RV_IMM, M_LUI, M_ILLEGAL, M_BUBBLE, M_BACK_TO_BACK,
    M_ISW_CBM, M_ISW_RV, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{
    "cbm.and", "cbm.or", "cbm.xor", "cbm.sll", "cbm.srl",
    "cbm immediate form", "es=0", "es=1", "es=2", "es=3", "refresh via x0",
    "prg reseed", "prg manual step", "prg step ignored", "prg auto off", "prg auto on",
    "cbm.s2r", "cbm.r2s", "rv32i reg-reg", "rv32i reg-imm", "lui", "illegal", "bubble",
    "back-to-back dependency", "ISW with CBM", "ISW with RV32I"};

  // Execute one instruction on the model; returns write-back and PRG effects.
  typedef struct {
    bit          legal, we;
    int          rd;
    logic [31:0] data;
    bit          reseed, step, auto_off, auto_on, r2s;
    int          part;
    logic [31:0] r2s_data;
    bit          reads_prev;
  } eff_t;

  function automatic logic [31:0] state_slice(logic [99:0] s, int p);
    return p == 3 ? {28'b0, s[99:96]} : s[32*p +: 32];
  endfunction

  function automatic eff_t model_exec(logic [31:0] in, bit count);
    eff_t e;
    logic [6:0] opc = in[6:0];
    int f3 = in[14:12], rd = in[11:7], rs1 = in[19:15], rs2 = in[24:20];
    int es = in[31:30];
    logic [31:0] a = m_reg[rs1], b = m_reg[rs2], r;
    rop_e cop [5] = '{R_AND, R_OR, R_XOR, R_SLL, R_SRL};
    e = '{default: 0};
    e.rd = rd;
    case (opc)
      7'b0001011: if (f3 <= 4 && in[29:25] == 0) begin
        r = alu(cop[f3], dec(a), dec(b));
        if (es[0]) r ^= {m_state[99:84], 16'h0};
        if (es[1]) r = enc(r);
        e.legal = 1; e.we = 1; e.data = r;
        e.reads_prev = m_prev_we && (rs1 == m_prev_rd || rs2 == m_prev_rd) && m_prev_rd != 0;
        if (count) begin
          mech[M_CBM_AND + f3]++;
          mech[M_ES0 + es]++;
          if (f3 inside {1, 2} && rs2 == 0 && es == 3) mech[M_REFRESH_X0]++;
        end
      end
      7'b0101011: if (f3 <= 4 && !(f3 >= 3 && in[29:25] != 0)) begin
        logic [31:0] imm = {{22{in[29]}}, in[29:20]};
        r = alu(cop[f3], dec(a), imm);
        if (es[0]) r ^= {m_state[99:84], 16'h0};
        if (es[1]) r = enc(r);
        e.legal = 1; e.we = 1; e.data = r;
        e.reads_prev = m_prev_we && rs1 == m_prev_rd && m_prev_rd != 0;
        if (count) begin mech[M_CBM_IMM]++; mech[M_CBM_AND + f3]++; mech[M_ES0 + es]++; end
      end
      7'b1011011: if (in[31:27] == 0 && in[24:20] == 0) begin
        int p = in[26:25];
        if (f3 == 0 && rs1 == 0 && rd == 0) begin
          e.legal = 1;
          case (p)
            0: e.reseed = 1;
            1: e.step = !m_auto;
            2: e.auto_off = 1;
            default: e.auto_on = 1;
          endcase
          if (count) begin
            if (p == 0) mech[M_PRG_RESEED]++;
            if (p == 1) mech[m_auto ? M_PRG_STEP_IGNORED : M_PRG_STEP]++;
            if (p == 2) mech[M_PRG_AUTO_OFF]++;
            if (p == 3) mech[M_PRG_AUTO_ON]++;
          end
        end else if (f3 == 1 && rs1 == 0) begin
          e.legal = 1; e.we = 1; e.data = state_slice(m_state, p);
          if (count) mech[M_S2R]++;
        end else if (f3 == 2 && rd == 0) begin
          e.legal = 1; e.r2s = 1; e.part = p; e.r2s_data = a;
          if (count) mech[M_R2S]++;
        end
      end
      7'b0110011: begin
        int f7 = in[31:25];
        rop_e ops [8] = '{R_ADD, R_SLL, R_SLT, R_SLTU, R_XOR, R_SRL, R_OR, R_AND};
        if (f7 == 0 || (f7 == 32 && f3 inside {0, 5})) begin
          rop_e o = ops[f3];
          if (f7 == 32) o = (f3 == 0) ? R_SUB : R_SRA;
          e.legal = 1; e.we = 1; e.data = alu(o, a, b);
          e.reads_prev = m_prev_we && (rs1 == m_prev_rd || rs2 == m_prev_rd) && m_prev_rd != 0;
          if (count) mech[M_RV_OP]++;
        end
      end
      7'b0010011: begin
        int f7 = in[31:25];
        rop_e ops [8] = '{R_ADD, R_SLL, R_SLT, R_SLTU, R_XOR, R_SRL, R_OR, R_AND};
        logic [31:0] imm = {{20{in[31]}}, in[31:20]};
        if ((f3 == 1 && f7 != 0) || (f3 == 5 && !(f7 inside {0, 32}))) ;
        else begin
          rop_e o = ops[f3];
          if (f3 == 5 && f7 == 32) o = R_SRA;
          e.legal = 1; e.we = 1; e.data = alu(o, a, imm);
          if (count) mech[M_RV_IMM]++;
        end
      end
      7'b0110111: begin
        e.legal = 1; e.we = 1; e.data = {in[31:12], 12'h0};
        if (count) mech[M_LUI]++;
      end
      default: ;
    endcase
    if (!e.legal && count) mech[M_ILLEGAL]++;
    if (rd == 0) e.we = 0;
    return e;
  endfunction

  // ---------------- checking, one cycle at a time ----------------
  logic        pres_valid;
  logic [31:0] pres_instr;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d: got %0h expected %0h", what, cycles, got, exp);
    end
  endtask

  // Present one instruction (or a bubble) and advance one clock.
  task automatic step(bit v, logic [31:0] in);
    eff_t e;
    instr_valid = v; instr = in;
    pres_valid = v; pres_instr = in;
    // EX stage of the previous instruction is visible now
    #1;
    if (m_ex_valid) begin
      e = model_exec(m_ex_instr, 1);
      if (e.reads_prev) mech[M_BACK_TO_BACK]++;
    end else begin
      e = '{default: 0};
      mech[M_BUBBLE]++;
    end
    check("ex_valid", ex_valid, m_ex_valid);
    check("illegal", illegal, m_ex_valid && !e.legal);
    check("wb_valid", wb_valid, m_ex_valid && e.we);
    if (m_ex_valid && e.we) begin
      check("wb_rd", wb_rd, e.rd);
      check("wb_data", wb_data, e.data);
    end
    check("prg_auto", prg_auto, m_auto);
    @(posedge clk);
    cycles++;
    // state updates at the edge
    if (m_ex_valid && e.we) m_reg[e.rd] = e.data;
    m_prev_we = m_ex_valid && e.we; m_prev_rd = e.rd;
    if (m_ex_valid && e.reseed) begin
      m_state = m_seed; m_round = 0;
    end else if (m_auto || (m_ex_valid && e.step)) begin
      m_state = keccak_round(m_state, m_round); m_round = (m_round + 1) % 16;
    end
    if (m_ex_valid && e.auto_off) m_auto = 0;
    if (m_ex_valid && e.auto_on)  m_auto = 1;
    if (m_ex_valid && e.r2s) begin
      if (e.part == 3) m_seed[99:96] = e.r2s_data[3:0];
      else             m_seed[32*e.part +: 32] = e.r2s_data;
    end
    m_ex_valid = pres_valid; m_ex_instr = pres_instr;
    #1;
    // architectural register state after the edge
    checks++;
    for (int r = 1; r < 32; r++)
      if (dut.u_regfile.regs[r] !== m_reg[r]) begin
        if (failures < 20)
          $display("FAIL x%0d at cycle %0d: got %h expected %h", r, cycles, dut.u_regfile.regs[r], m_reg[r]);
        failures++;
        break;
      end
  endtask

  // The instruction stream is built first as a list and then played through
  // a single call of step(); entries may carry an end-of-sequence check.
  typedef struct {
    bit          v;
    logic [31:0] in;
    int          chk;     // index into chks, -1 for none
  } item_t;
  typedef struct {
    int          kind;    // 0: refresh, 1: ISW with CBM, 2: ISW with RV32I
    int          ra, rb;
    logic [15:0] exp;
  } chk_t;
  item_t prog [$];
  chk_t  chks [$];

  function automatic void exec(logic [31:0] in); prog.push_back('{1, in, -1}); endfunction
  function automatic void bubble(); prog.push_back('{0, 32'h0, -1}); endfunction
  function automatic void add_check(int kind, int ra, int rb, logic [15:0] exp);
    chks.push_back('{kind, ra, rb, exp});
    prog.push_back('{0, 32'h0, chks.size() - 1});
  endfunction

  // load a 32-bit constant with lui + addi
  function automatic void li(int rd, logic [31:0] v);
    logic [31:0] hi = v + 32'h800;
    exec(lui(rd, {hi[31:12], 12'h0}));
    exec(addi(rd, rd, int'($signed(v[11:0]))));
  endfunction

  // ---------------- workloads ----------------
  // First-order ISW multiplication on 16-bit shares (the share lives in the
  // low half, the upper half holds encoding randomness).
  function automatic void isw(bit use_cbm);
    logic [15:0] x0, x1, y0, y1, rm;
    logic [31:0] X0, X1, Y0, Y1;
    x0 = 16'($urandom); x1 = 16'($urandom); y0 = 16'($urandom); y1 = 16'($urandom);
    rm = 16'($urandom);
    if (use_cbm) begin
      X0 = enc({16'($urandom), x0}); X1 = enc({16'($urandom), x1});
      Y0 = enc({16'($urandom), y0}); Y1 = enc({16'($urandom), y1});
    end else begin
      X0 = {16'h0, x0}; X1 = {16'h0, x1}; Y0 = {16'h0, y0}; Y1 = {16'h0, y1};
    end
    li(10, X0); li(11, X1); li(12, Y0); li(13, Y1);
    li(14, use_cbm ? enc({16'($urandom), rm}) : {16'h0, rm});
    bubble();
    if (use_cbm) begin
      exec(cbm_rr(C_AND, 15, 10, 12, 3)); exec(rv_xor(15, 15, 14));
      exec(cbm_rr(C_AND, 16, 10, 13, 3)); exec(rv_xor(16, 16, 14));
      exec(cbm_rr(C_AND, 17, 11, 12, 3)); exec(rv_xor(16, 16, 17));
      exec(cbm_rr(C_AND, 17, 11, 13, 3)); exec(rv_xor(16, 16, 17));
    end else begin
      exec(rv_and(15, 10, 12)); exec(rv_xor(15, 15, 14));
      exec(rv_and(16, 10, 13)); exec(rv_xor(16, 16, 14));
      exec(rv_and(17, 11, 12)); exec(rv_xor(16, 16, 17));
      exec(rv_and(17, 11, 13)); exec(rv_xor(16, 16, 17));
    end
    bubble(); bubble();
    add_check(use_cbm ? 1 : 2, 15, 16, (x0 ^ x1) & (y0 ^ y1));
  endfunction

  // Checks on the register file contents at a marker.
  task automatic run_check(chk_t c);
    logic [31:0] za, zb, zl;
    za = dut.u_regfile.regs[c.ra];
    zb = dut.u_regfile.regs[c.rb];
    case (c.kind)
      0: check("refresh keeps share", 32'(dec(za) & 32'hFFFF), 32'(c.exp));
      1: begin
        zl = dec(za) ^ dec(zb);
        check("ISW (CBM) product", zl[15:0], c.exp);
        mech[M_ISW_CBM]++;
      end
      default: begin
        zl = za ^ zb;
        check("ISW (RV32I) product", zl[15:0], c.exp);
        mech[M_ISW_RV]++;
      end
    endcase
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_reg[i]) m_reg[i] = '0;
    foreach (mech[i])  mech[i] = 0;
    m_state = SEED0; m_seed = SEED0; m_round = 0; m_auto = 1;
    m_ex_valid = 0; m_ex_instr = '0; m_prev_we = 0; m_prev_rd = 0;
    instr_valid = 0; instr = '0;

    // 1. PRG management
    exec(cbm_prg(1));                       // step while auto on: no extra update
    exec(cbm_prg(2));                       // auto off
    exec(cbm_s2r(1, 0)); bubble(); bubble();
    exec(cbm_s2r(2, 0));                    // unchanged while auto off
    exec(cbm_prg(1));                       // manual step
    exec(cbm_s2r(3, 0));
    li(5, 32'h1234_5678); li(6, 32'h9ABC_DEF0); li(7, 32'h0F0F_0F0F); li(8, 32'h0000_000A);
    exec(cbm_r2s(5, 0)); exec(cbm_r2s(6, 1)); exec(cbm_r2s(7, 2)); exec(cbm_r2s(8, 3));
    exec(cbm_prg(0));                       // reseed from the written seed
    exec(cbm_s2r(9, 0)); exec(cbm_s2r(9, 1)); exec(cbm_s2r(9, 2)); exec(cbm_s2r(9, 3));
    exec(cbm_prg(3));                       // auto on
    exec(cbm_s2r(9, 0)); exec(cbm_s2r(9, 0));
    // refresh a protected share through x0 and check it still decodes
    li(20, enc(32'hAAAA_1357));
    exec(cbm_rr(C_XOR, 21, 20, 0, 3)); bubble();
    add_check(0, 21, 21, 16'h1357);
    // overwrite of one protected share by another (mv)
    exec(addi(20, 21, 0));

    // 2./3. ISW multiplication
    for (int n = 0; n < 20; n++) begin isw(1); isw(0); end

    // 4. random mix
    for (int n = 0; n < 20000; n++) begin
      automatic int k = $urandom % 100;
      automatic int rd = $urandom % 32, rs1 = $urandom % 32, rs2 = $urandom % 32;
      if (k < 8)       bubble();
      else if (k < 40) exec(cbm_rr($urandom % 5, rd, rs1, rs2, $urandom % 4));
      else if (k < 55) exec(cbm_ri($urandom % 5, rd, rs1, ($urandom % 2) ? $urandom % 32 : $urandom % 1024, $urandom % 4));
      else if (k < 60) exec(cbm_prg($urandom % 4));
      else if (k < 64) exec(cbm_s2r(rd, $urandom % 4));
      else if (k < 67) exec(cbm_r2s(rs1, $urandom % 4));
      else if (k < 80) exec(r_type(($urandom % 4 == 0) ? 32 : 0, $urandom % 8, rd, rs1, rs2));
      else if (k < 92) exec(i_type($urandom % 8, rd, rs1, ($urandom % 8 == 5) ? 32'h400 | ($urandom % 32) : $urandom % 4096));
      else if (k < 96) exec(lui(rd, $urandom));
      else             exec($urandom);
    end
    bubble(); bubble();

    // play the stream, starting just after a clock edge
    // reset is released just after an edge so the model and the design
    // see the same first clock edge
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (prog[i]) begin
      if (prog[i].chk >= 0) run_check(chks[prog[i].chk]);
      else step(prog[i].v, prog[i].in);
    end

    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %-20s %0d", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_name[i]);
      end
    end
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
