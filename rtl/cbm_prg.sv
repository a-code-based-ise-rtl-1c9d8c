// cbm_prg: duplex-based pseudorandom generator built on Keccak-p[100].
//
// The generator holds a 100-bit state S and a round index. Each update applies
// one Keccak-p[100] round to S (one round per clock cycle) and advances the
// round index modulo 16. The output rnd_o is the top 16 bits of S (the rate;
// the remaining 84 bits are the capacity), and it feeds the refresh XOR of the
// wrapped ALU. Control, one operation per cycle:
//   op 0 (reseed)   : S <- seed register, round index <- 0; the following
//                      updates apply the permutation to it (Setup)
//   op 1 (step)     : one update, only while automatic mode is off
//   op 2 (auto off) : stop updating every cycle
//   op 3 (auto on)  : update S every clock cycle
// r2s writes 32-bit slice `part` of the 100-bit seed register (bits
// 32*part .. 32*part+31; slice 3 holds only bits 99:96), s2r reads the same
// slice of the state S (zero-extended). All updates take effect at the next
// clock edge; s2r and rnd_o are combinational views of the current state.
// The 100-bit state, the 16-bit output, one round per cycle and the four
// operations follow the published PRG. The separate seed register written by
// r2s, the round-index schedule, the automatic mode being on after reset and
// the reset seed SEED_INIT are this design's choices.
module cbm_prg
  import cbm_pkg::*;
#(
  parameter logic [PRG_B-1:0] SEED_INIT = 100'h0_5EED_C0DE_0123_4567_89AB_CDEF,
  parameter bit               AUTO_INIT = 1'b1
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              op_valid_i,
  input  prg_op_e           op_i,
  input  logic              r2s_valid_i,
  input  logic [1:0]        part_i,
  input  logic [31:0]       r2s_data_i,
  output logic [31:0]       s2r_data_o,
  output logic [PRG_R-1:0]  rnd_o,
  output logic              auto_en_o
);

  logic [PRG_B-1:0] state_q, seed_q, state_round;
  logic [3:0]       round_q;
  logic             auto_q;
  logic             do_step;

  keccak_p100_round u_round (
    .state_i (state_q),
    .round_i (round_q),
    .state_o (state_round)
  );

  assign do_step = auto_q || (op_valid_i && op_i == PRG_STEP);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= SEED_INIT;
      round_q <= '0;
      auto_q  <= AUTO_INIT;
    end else begin
      if (op_valid_i && op_i == PRG_RESEED) begin
        state_q <= seed_q;
        round_q <= '0;
      end else if (do_step) begin
        state_q <= state_round;
        round_q <= round_q + 4'd1;
      end
      if (op_valid_i && op_i == PRG_AUTO_OFF) auto_q <= 1'b0;
      if (op_valid_i && op_i == PRG_AUTO_ON)  auto_q <= 1'b1;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      seed_q <= SEED_INIT;
    end else if (r2s_valid_i) begin
      unique case (part_i)
        2'd0: seed_q[31:0]  <= r2s_data_i;
        2'd1: seed_q[63:32] <= r2s_data_i;
        2'd2: seed_q[95:64] <= r2s_data_i;
        default: seed_q[99:96] <= r2s_data_i[3:0];
      endcase
    end
  end

  always_comb begin
    unique case (part_i)
      2'd0: s2r_data_o = state_q[31:0];
      2'd1: s2r_data_o = state_q[63:32];
      2'd2: s2r_data_o = state_q[95:64];
      default: s2r_data_o = {28'b0, state_q[99:96]};
    endcase
  end

  assign rnd_o     = state_q[PRG_B-1 -: PRG_R];
  assign auto_en_o = auto_q;

endmodule
