// keccak_p100_round: one round of the Keccak-p[100] permutation.
//
// The 100-bit state is a 5x5 array of 4-bit lanes; bit z of lane (x,y) is
// state[4*(5*y+x)+z], the usual Keccak string ordering. One round applies, in
// order, theta (column parity mixing), rho (lane rotations by the standard
// offsets taken modulo 4), pi (lane permutation), chi (the non-linear row map
// a ^ (~b & c)) and iota (round constant into lane (0,0)). The rotation
// offsets and the round constants are derived at elaboration time from the
// Keccak definitions (offset (t+1)(t+2)/2 along the (x,y) -> (y,2x+3y) walk;
// constant bits 0, 1 and 3 of round i from the degree-8 LFSR bit rc(j+7i)).
// The PRG runs this round once per clock on its state. round_i selects the
// constant of rounds 0..15 of Keccak-f[100]. Purely combinational.
module keccak_p100_round (
  input  logic [99:0] state_i,
  input  logic [3:0]  round_i,
  output logic [99:0] state_o
);

  localparam int unsigned W = 4;

  // Bit t of the Keccak round-constant LFSR (x^8 + x^6 + x^5 + x^4 + 1).
  function automatic logic rc_bit(int unsigned t);
    logic [8:0] r;
    r = 9'b0_0000_0001;
    for (int unsigned i = 0; i < (t % 255); i++) begin
      r = {r[7:0], 1'b0};
      if (r[8]) r = r ^ 9'b1_0111_0001;
    end
    return r[0];
  endfunction

  function automatic logic [16*W-1:0] round_constants();
    logic [16*W-1:0] rc;
    rc = '0;
    for (int unsigned i = 0; i < 16; i++) begin
      rc[i*W + 0] = rc_bit(0 + 7*i);
      rc[i*W + 1] = rc_bit(1 + 7*i);
      rc[i*W + 3] = rc_bit(2 + 7*i);
    end
    return rc;
  endfunction

  // Rotation offset (mod W) of lane x + 5y, packed 2 bits per lane.
  function automatic logic [49:0] rho_offsets();
    logic [49:0] off;
    int unsigned x, y, nx;
    off = '0;
    x = 1; y = 0;
    for (int unsigned t = 0; t < 24; t++) begin
      off[2*(x+5*y) +: 2] = 2'(((t+1)*(t+2)/2) % W);
      nx = y;
      y  = (2*x + 3*y) % 5;
      x  = nx;
    end
    return off;
  endfunction

  localparam logic [16*W-1:0] RC  = round_constants();
  localparam logic [49:0]     RHO = rho_offsets();

  always_comb begin
    logic [W-1:0] a [25];
    logic [W-1:0] b [25];
    logic [W-1:0] c [5];
    logic [W-1:0] d [5];
    int unsigned  r;

    for (int i = 0; i < 25; i++) a[i] = state_i[W*i +: W];

    // theta
    for (int x = 0; x < 5; x++)
      c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) begin
      logic [W-1:0] cp;
      cp = c[(x+1)%5];
      d[x] = c[(x+4)%5] ^ {cp[W-2:0], cp[W-1]};
    end
    for (int i = 0; i < 25; i++) a[i] = a[i] ^ d[i%5];

    // rho and pi: b[y, 2x+3y] = rot(a[x, y], r[x, y])
    for (int x = 0; x < 5; x++) begin
      for (int y = 0; y < 5; y++) begin
        logic [2*W-1:0] dbl;
        r   = int'(RHO[2*(x+5*y) +: 2]);
        dbl = {a[x+5*y], a[x+5*y]} << r;
        b[y + 5*((2*x+3*y)%5)] = dbl[2*W-1:W];
      end
    end

    // chi
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        a[x+5*y] = b[x+5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);

    // iota
    a[0] = a[0] ^ RC[W*round_i +: W];

    for (int i = 0; i < 25; i++) state_o[W*i +: W] = a[i];
  end

endmodule
