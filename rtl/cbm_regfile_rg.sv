// cbm_regfile_rg: flip-flop register file with register gating on both read ports.
//
// NREGS registers of W bits; register 0 reads as zero and ignores writes.
// Instead of a multiplexer tree, each read port ANDs every register with one
// bit of a one-hot read-select word and ORs the gated words together, so no
// gate ever sees bits of two registers at once and a port whose select is
// all-zero outputs zero (no unintended reads). The one-hot select is computed
// from the read address one stage early (in the fetch stage) and held in a
// register, so it is glitch-free when the execute stage reads: an address
// presented with its enable in cycle t selects the data seen on rdata in
// cycle t+1. The enable clears the select, so an unused port reads zero.
// The write port is an ordinary decoded write, not gated, and takes effect at
// the clock edge; a read in the following cycle sees the new value.
// Gating both read ports but not the write port follows the published
// implementation; reset of the registers to zero is this design's choice.
module cbm_regfile_rg #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  // Read addresses, one cycle ahead of the data
  input  logic [AW-1:0] raddr_a_i,
  input  logic          ren_a_i,
  input  logic [AW-1:0] raddr_b_i,
  input  logic          ren_b_i,
  output logic [W-1:0]  rdata_a_o,
  output logic [W-1:0]  rdata_b_o,
  // Write port
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [W-1:0]  wdata_i
);

  logic [W-1:0]     regs [NREGS];
  logic [NREGS-1:0] sel_a_q, sel_b_q;

  // One-hot read selects, registered; entry 0 never selected.
  function automatic logic [NREGS-1:0] onehot(logic [AW-1:0] addr, logic en);
    logic [NREGS-1:0] oh;
    oh = '0;
    if (en && addr != '0) oh[addr] = 1'b1;
    return oh;
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      sel_a_q <= '0;
      sel_b_q <= '0;
    end else begin
      sel_a_q <= onehot(raddr_a_i, ren_a_i);
      sel_b_q <= onehot(raddr_b_i, ren_b_i);
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we_i && waddr_i != '0) begin
      regs[waddr_i] <= wdata_i;
    end
  end

  // AND gate per register, OR tree per port.
  always_comb begin
    rdata_a_o = '0;
    rdata_b_o = '0;
    for (int i = 1; i < NREGS; i++) begin
      rdata_a_o = rdata_a_o | (regs[i] & {W{sel_a_q[i]}});
      rdata_b_o = rdata_b_o | (regs[i] & {W{sel_b_q[i]}});
    end
  end

  // The gating relies on at most one select bit per port.
  assert property (@(posedge clk_i) disable iff (!rst_ni) $onehot0(sel_a_q))
    else $error("read port a select not one-hot");
  assert property (@(posedge clk_i) disable iff (!rst_ni) $onehot0(sel_b_q))
    else $error("read port b select not one-hot");

endmodule
