// gf_iso: isomorphism from the AES field GF(2^8) to the tower field
// GF((2^4)^2) used by the TI inversion.  The map is linear, so it is
// applied to each share on its own and the shares stay a valid sharing.
// Purely combinational.  The basis images are listed in ti_aes_pkg.
// Keeping the isomorphism outside the inversion follows the architecture
// ("separated inversion, isomorphism and affine"); the basis is this
// design's choice.
module gf_iso
  import ti_aes_pkg::*;
(
  input  sbyte_t a,    // AES-field byte, two shares
  output sbyte_t t     // tower-field byte, two shares
);
  always_comb
    for (int i = 0; i < NSHARES; i++)
      t[i] = iso_a2t(a[i]);
endmodule
