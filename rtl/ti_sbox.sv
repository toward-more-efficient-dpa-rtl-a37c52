// ti_sbox: stand-alone first-order TI AES S-box.  The shared input byte
// passes through the isomorphism (gf_iso), the three-stage TI inversion
// (ti_inversion) and the inverse isomorphism with the affine transform
// (sbox_affine).  XOR of the two output shares equals SubBytes(XOR of the
// two input shares).
// Timing: one input per cycle; the result for the input of cycle t is
// valid in cycle t+3.  rnd (112 bits) must be fresh every cycle.
module ti_sbox
  import ti_aes_pkg::*;
(
  input  logic                  clk,
  input  sbyte_t                a,
  input  logic [SBOX_RND_W-1:0] rnd,
  output sbyte_t                s
);
  sbyte_t t_in, t_out;

  gf_iso       u_iso (.a(a), .t(t_in));
  ti_inversion u_inv (.clk(clk), .x(t_in), .rnd(rnd), .y(t_out));
  sbox_affine  u_aff (.t(t_out), .s(s));
endmodule
