// cbm_ref_pkg: reference models used by the testbenches.
//
// Everything here is written from the defining equations, independently of
// the RTL structure: GF(2^4) multiplication (polynomial x^4 + x + 1) and the
// 8x8 MDS matrix product element by element, a bit-level Keccak-p[100] round
// using the tabulated rotation offsets, and the RV32I ALU semantics.
package cbm_ref_pkg;

  // Loop limits kept in variables so that simulators build these models as
  // loops rather than unrolling them at every call site.
  int n5 = 5;
  int n8 = 8;

  function automatic logic [3:0] gf_mul(logic [3:0] a, logic [3:0] b);
    logic [7:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 8'(a) << i;
    for (int i = 7; i >= 4; i--) if (p[i]) p ^= 8'h13 << (i - 4);
    return p[3:0];
  endfunction

  function automatic int mds(int r, int c);
    int m [8][8] = '{
      '{ 2,  3,  4, 12,  5, 10,  8, 15},
      '{ 3,  2, 12,  4, 10,  5, 15,  8},
      '{ 4, 12,  2,  3,  8, 15,  5, 10},
      '{12,  4,  3,  2, 15,  8, 10,  5},
      '{ 5, 10,  8, 15,  2,  3,  4, 12},
      '{10,  5, 15,  8,  3,  2, 12,  4},
      '{ 8, 15,  5, 10,  4, 12,  2,  3},
      '{15,  8, 10,  5, 12,  4,  3,  2}};
    return m[r][c];
  endfunction

  // A * x, element k of x in bits [4k+3:4k]
  function automatic logic [31:0] mds_mul(logic [31:0] x);
    logic [31:0] y;
    y = '0;
    for (int r = 0; r < n8; r++)
      for (int c = 0; c < n8; c++)
        y[4*r +: 4] ^= gf_mul(4'(mds(r, c)), x[4*c +: 4]);
    return y;
  endfunction

  function automatic logic [31:0] enc(logic [31:0] x); return mds_mul(x); endfunction
  function automatic logic [31:0] dec(logic [31:0] x); return mds_mul(x); endfunction

  function automatic logic lfsr_rc(int t);
    logic [7:0] r;
    logic       fb;
    if (t % 255 == 0) return 1'b1;
    r = 8'h01;
    for (int i = 1; i <= t % 255; i++) begin
      fb = r[7];
      r  = {r[6:0], 1'b0};
      r[0] ^= fb; r[4] ^= fb; r[5] ^= fb; r[6] ^= fb;
    end
    return r[0];
  endfunction

  function automatic logic [99:0] keccak_round(logic [99:0] s, int ir);
    int rot [5][5] = '{          // rot[x][y]
      '{  0,  36,   3, 105, 210},
      '{  1, 300,  10,  45,  66},
      '{190,   6, 171,  15, 253},
      '{ 28,  55, 153,  21, 120},
      '{ 91, 276, 231, 136,  78}};
    logic a [5][5][4];
    logic b [5][5][4];
    logic c [5][4];
    logic d [5][4];
    logic [99:0] o;
    for (int x = 0; x < n5; x++) for (int y = 0; y < 5; y++) for (int z = 0; z < 4; z++)
      a[x][y][z] = s[4*(5*y+x)+z];
    for (int x = 0; x < n5; x++) for (int z = 0; z < 4; z++)
      c[x][z] = a[x][0][z] ^ a[x][1][z] ^ a[x][2][z] ^ a[x][3][z] ^ a[x][4][z];
    for (int x = 0; x < n5; x++) for (int z = 0; z < 4; z++)
      d[x][z] = c[(x+4)%5][z] ^ c[(x+1)%5][(z+3)%4];
    for (int x = 0; x < n5; x++) for (int y = 0; y < 5; y++) for (int z = 0; z < 4; z++)
      a[x][y][z] ^= d[x][z];
    for (int x = 0; x < n5; x++) for (int y = 0; y < 5; y++) for (int z = 0; z < 4; z++)
      b[y][(2*x+3*y)%5][z] = a[x][y][((z - rot[x][y]) % 4 + 4) % 4];
    for (int x = 0; x < n5; x++) for (int y = 0; y < 5; y++) for (int z = 0; z < 4; z++)
      a[x][y][z] = b[x][y][z] ^ (!b[(x+1)%5][y][z] & b[(x+2)%5][y][z]);
    a[0][0][0] ^= lfsr_rc(0 + 7*ir);
    a[0][0][1] ^= lfsr_rc(1 + 7*ir);
    a[0][0][3] ^= lfsr_rc(2 + 7*ir);
    for (int x = 0; x < n5; x++) for (int y = 0; y < 5; y++) for (int z = 0; z < 4; z++)
      o[4*(5*y+x)+z] = a[x][y][z];
    return o;
  endfunction

  // RV32I ALU semantics by operation name
  typedef enum int {R_ADD, R_SUB, R_SLL, R_SLT, R_SLTU, R_XOR, R_SRL, R_SRA, R_OR, R_AND} rop_e;

  function automatic logic [31:0] alu(rop_e op, logic [31:0] a, logic [31:0] b);
    case (op)
      R_ADD:  return a + b;
      R_SUB:  return a - b;
      R_SLL:  return a << b[4:0];
      R_SLT:  return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
      R_SLTU: return (a < b) ? 32'd1 : 32'd0;
      R_XOR:  return a ^ b;
      R_SRL:  return a >> b[4:0];
      R_SRA:  return 32'($signed(a) >>> b[4:0]);
      R_OR:   return a | b;
      default: return a & b;
    endcase
  endfunction

endpackage
