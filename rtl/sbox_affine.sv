// sbox_affine: back end of the AES S-box for shared data.  Each share is
// mapped from the tower field back to the AES field and passed through the
// linear part of the AES affine transform; the constant 8'h63 is added to
// share 0 only, so the XOR of the output shares is the S-box value.
// Purely combinational.  The inverse isomorphism and the affine map are
// merged into one linear stage; that merge is this design's choice.
module sbox_affine
  import ti_aes_pkg::*;
(
  input  sbyte_t t,    // tower-field inverse, two shares
  output sbyte_t s     // S-box output, two shares
);
  always_comb
    for (int i = 0; i < NSHARES; i++)
      s[i] = affine_lin(iso_t2a(t[i])) ^ ((i == 0) ? AFFINE_C : 8'h00);
endmodule
