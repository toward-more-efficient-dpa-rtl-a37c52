// ti_inversion: first-order threshold implementation of GF(2^8) inversion
// with d+1 = 2 input shares, operating on tower-field bytes
// (see ti_aes_pkg for the field representation).
//
// The inversion a^-1 = (ah*Y + ah + al) * d^-1, d = NU*ah^2 + ah*al + al^2,
// is split into three stages separated by registers, so that glitches
// cannot combine shares across a stage:
//   Stage 1  d = NU*ah^2 + al^2 + ah*al.  The product is expanded into the
//            four cross terms ah_i*al_j; each term uses one share of each
//            input (non-completeness).  The linear part of share i is
//            added to term (i,i).  Four nibbles are ring-refreshed and
//            registered, then compressed to two shares of d.
//   Stage 2  d^-1 in GF(2^4), in one (non-pipelined) stage.  d^-1 is cubic
//            in the bits of d.  Component s (s = 0..15) uses share s[v] of
//            bit v only, and holds the monomials whose variables cover
//            the set bits of s:  f_s = XOR over U subset of s of
//            inv(z_s with the bits of U cleared), z_s[v] = d_{s[v]}[v].
//            The 16 components sum to d^-1.  They are ring-refreshed,
//            registered and compressed to two shares.
//   Stage 3  out_h = ah*d^-1, out_l = (ah^al)*d^-1 as four cross terms
//            (share i of ah/al, share j of d^-1), ring-refreshed,
//            registered and compressed to two output shares.
// ah and al are delayed alongside so that Stage 3 sees matching data.
//
// Ring refresh: component k gets r_k ^ r_(k+1 mod n); the masks cancel in
// the compressed sum.
//
// Timing: fully pipelined, one new input per cycle, no stall.  The output
// shares for an input applied in cycle t are valid in cycle t+3
// (SBOX_LAT).  rnd must be fresh every cycle.
//
// The three-stage split, the d+1 sharing and the single-cycle Stage 2
// follow the architecture; the field basis (GF(2^4) in polynomial basis),
// the component assignment of Stage 2 and the ring-refresh placement are
// this implementation's own choices.  It uses SBOX_RND_W = 112 random bits
// per cycle.
module ti_inversion
  import ti_aes_pkg::*;
(
  input  logic                  clk,
  input  sbyte_t                x,      // tower-field input, two shares
  input  logic [SBOX_RND_W-1:0] rnd,    // fresh masks, every cycle
  output sbyte_t                y       // tower-field inverse, two shares
);

  logic [RND1_W-1:0] r1;
  logic [RND2_W-1:0] r2;
  logic [RND3_W-1:0] r3;
  assign r1 = rnd[RND1_W-1:0];
  assign r2 = rnd[RND1_W +: RND2_W];
  assign r3 = rnd[RND1_W+RND2_W +: RND3_W];

  // ---------------- Stage 1 ----------------
  nib_t c1_d [4];                   // combinational terms, index 2*i+j
  nib_t s1_q [4];                   // registered terms
  sbyte_t s1_x, s2_x;               // delayed input shares

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      for (int j = 0; j < 2; j++) begin
        nib_t t;
        t = gf4_mul(x[i][7:4], x[j][3:0]);
        if (i == j)
          t = t ^ gf4_mul(NU, gf4_sq(x[i][7:4])) ^ gf4_sq(x[i][3:0]);
        c1_d[2*i+j] = t ^ r1[4*(2*i+j) +: 4] ^ r1[4*((2*i+j+1) % 4) +: 4];
      end
    end
  end

  always_ff @(posedge clk) begin
    s1_q <= c1_d;
    s1_x <= x;
  end

  // ---------------- Stage 2 ----------------
  nib_t d_sh [2];
  nib_t c2_d [16];
  nib_t s2_q [16];

  assign d_sh[0] = s1_q[0] ^ s1_q[1];
  assign d_sh[1] = s1_q[2] ^ s1_q[3];

  always_comb begin
    for (int s = 0; s < 16; s++) begin
      nib_t z, f;
      for (int v = 0; v < 4; v++)
        z[v] = s[v] ? d_sh[1][v] : d_sh[0][v];
      f = '0;
      for (int u = 0; u < 16; u++)
        if ((u & ~s) == 0)
          f = f ^ gf4_inv(z & ~nib_t'(u));
      c2_d[s] = f ^ r2[4*s +: 4] ^ r2[4*((s+1) % 16) +: 4];
    end
  end

  always_ff @(posedge clk) begin
    s2_q <= c2_d;
    s2_x <= s1_x;
  end

  // ---------------- Stage 3 ----------------
  nib_t g_sh [2];
  byte_t c3_d [4];
  byte_t s3_q [4];

  always_comb begin
    g_sh[0] = '0;
    g_sh[1] = '0;
    for (int s = 0; s < 8; s++) begin
      g_sh[0] = g_sh[0] ^ s2_q[s];
      g_sh[1] = g_sh[1] ^ s2_q[s+8];
    end
  end

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      for (int j = 0; j < 2; j++) begin
        nib_t oh, ol;
        oh = gf4_mul(s2_x[i][7:4], g_sh[j]);
        ol = gf4_mul(s2_x[i][7:4] ^ s2_x[i][3:0], g_sh[j]);
        c3_d[2*i+j] = {oh, ol} ^ r3[8*(2*i+j) +: 8] ^ r3[8*((2*i+j+1) % 4) +: 8];
      end
    end
  end

  always_ff @(posedge clk) begin
    s3_q <= c3_d;
  end

  assign y[0] = s3_q[0] ^ s3_q[1];
  assign y[1] = s3_q[2] ^ s3_q[3];

endmodule
