// mixcolumns_row: one output byte of AES MixColumns.  Given a column
// (a0..a3) and a row r it returns 2*a_r ^ 3*a_(r+1) ^ a_(r+2) ^ a_(r+3)
// over GF(2^8).  MixColumns is linear, so each share is processed on its
// own.  Combinational.  Producing one row per cycle lets the core perform
// MixColumns byte by byte, in step with the byte-serial S-box feed; that
// split is this design's choice.
module mixcolumns_row
  import ti_aes_pkg::*;
(
  input  scol_t      col,   // column, two shares per byte
  input  logic [1:0] row,
  output sbyte_t     y
);
  always_comb begin
    for (int i = 0; i < NSHARES; i++) begin
      byte_t a0, a1, a2, a3;
      a0 = col[row][i];
      a1 = col[2'(row + 2'd1)][i];
      a2 = col[2'(row + 2'd2)][i];
      a3 = col[2'(row + 2'd3)][i];
      y[i] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
    end
  end
endmodule
