// ti_aes_pkg: types, constants and field arithmetic shared by the
// threshold-implementation (TI) AES core.
//
// Masking: every secret byte x is carried as two Boolean shares,
// x = x[0] ^ x[1] (first-order TI with d+1 = 2 input shares).
//
// Field representation used inside the S-box (a design choice; the
// architecture only requires "tower-field arithmetic"):
//   GF(2^4) = GF(2)[w]/(w^4 + w + 1)
//   GF(2^8) = GF(2^4)[Y]/(Y^2 + Y + NU),  NU = w^3 (4'h8)
// A tower byte t holds t[7:4] = high coefficient ah, t[3:0] = low al,
// t = ah*Y + al.  The inverse is (ah*Y + ah + al) * d^-1 with
// d = NU*ah^2 + ah*al + al^2.
// The isomorphism from the AES field (x^8+x^4+x^3+x+1) maps AES bit i to
// tower value ISO_A2T[i]; the inverse maps tower bit i to ISO_T2A[i].
// These images come from w = 8'h5C and Y = 8'hA2 in the AES field, the
// two roots that satisfy w^4+w+1 = 0 and Y^2+Y+w^3 = 0.
package ti_aes_pkg;

  localparam int unsigned NSHARES = 2;

  typedef logic [7:0] byte_t;
  typedef logic [3:0] nib_t;
  typedef byte_t [NSHARES-1:0] sbyte_t;   // one byte as two shares
  typedef byte_t  [15:0] state_t;          // 16 bytes, index 4*col + row
  typedef sbyte_t [15:0] sstate_t;         // shared 16-byte state
  typedef sbyte_t [3:0]  scol_t;           // shared column, index = row

  // Fresh randomness consumed by one S-box evaluation per cycle.
  localparam int unsigned RND1_W  = 16;   // stage 1: 4 nibble ring refresh
  localparam int unsigned RND2_W  = 64;   // stage 2: 16 nibble ring refresh
  localparam int unsigned RND3_W  = 32;   // stage 3: 4 byte ring refresh
  localparam int unsigned SBOX_RND_W = RND1_W + RND2_W + RND3_W;

  // Inversion pipeline depth (registers between input and output).
  localparam int unsigned SBOX_LAT = 3;

  localparam byte_t ISO_A2T [8] = '{8'h01, 8'h20, 8'h46, 8'h4C, 8'h3C, 8'hD5, 8'h34, 8'hE5};
  localparam byte_t ISO_T2A [8] = '{8'h01, 8'h5C, 8'hE0, 8'h50, 8'hA2, 8'h02, 8'hB8, 8'hDB};
  localparam nib_t  NU = 4'h8;

  // GF(2^4) multiplication modulo w^4 + w + 1.
  function automatic nib_t gf4_mul(nib_t a, nib_t b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) p = p ^ (7'(a) << i);
    for (int i = 6; i >= 4; i--)
      if (p[i]) p = p ^ (7'(5'b10011) << (i - 4));
    return p[3:0];
  endfunction

  function automatic nib_t gf4_sq(nib_t a);
    return gf4_mul(a, a);
  endfunction

  // GF(2^4) inversion as a^14 (0 maps to 0).
  function automatic nib_t gf4_inv(nib_t a);
    nib_t a2, a4, a8;
    a2 = gf4_sq(a);
    a4 = gf4_sq(a2);
    a8 = gf4_sq(a4);
    return gf4_mul(gf4_mul(a8, a4), a2);
  endfunction

  // Linear maps between the AES field and the tower field.
  function automatic byte_t iso_a2t(byte_t a);
    byte_t t;
    t = '0;
    for (int i = 0; i < 8; i++)
      if (a[i]) t = t ^ ISO_A2T[i];
    return t;
  endfunction

  function automatic byte_t iso_t2a(byte_t t);
    byte_t a;
    a = '0;
    for (int i = 0; i < 8; i++)
      if (t[i]) a = a ^ ISO_T2A[i];
    return a;
  endfunction

  // Linear part of the AES S-box affine transform (without 8'h63).
  function automatic byte_t affine_lin(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return r;
  endfunction

  localparam byte_t AFFINE_C = 8'h63;

  // Multiplication by x in the AES field.
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1B : 8'h00);
  endfunction

endpackage
