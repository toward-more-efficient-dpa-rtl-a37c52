// state_array: the shared (two-share) 16-byte AES state of the byte-serial
// core.  Byte i sits at column i/4, row i%4 (FIPS-197 input order).
//
// Read side (combinational): the byte at rd_idx and the whole column that
// contains it, for the MixColumns-row unit.
// Write side (one clock edge):
//   load    replace the whole state (masked plaintext)
//   wb_en   write an S-box result into byte wb_idx
//   sr_en   apply ShiftRows to the whole array in one cycle
//   ark_en  XOR an (unmasked) key byte into share 0 of byte ark_idx
// load wins over sr_en, and sr_en over the byte writes; the controller
// never asks for them together.  Byte writes go to the slot that was read
// SBOX_LAT cycles earlier, which the core no longer needs, so SubBytes is
// done in place without a second buffer.
// The state is not reset: it is always loaded before it is read.
module state_array
  import ti_aes_pkg::*;
(
  input  logic       clk,
  input  logic       load,
  input  sstate_t    load_data,
  input  logic [3:0] rd_idx,
  output sbyte_t     rd_byte,
  output scol_t      rd_col,
  input  logic       wb_en,
  input  logic [3:0] wb_idx,
  input  sbyte_t     wb_data,
  input  logic       sr_en,
  input  logic       ark_en,
  input  logic [3:0] ark_idx,
  input  byte_t      ark_key,
  output sstate_t    state
);
  sstate_t st_q;

  assign state   = st_q;
  assign rd_byte = st_q[rd_idx];
  always_comb
    for (int r = 0; r < 4; r++)
      rd_col[r] = st_q[{rd_idx[3:2], 2'(r)}];

  always_ff @(posedge clk) begin
    if (load) begin
      st_q <= load_data;
    end else if (sr_en) begin
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          st_q[4*c + r] <= st_q[4*((c + r) % 4) + r];
    end else begin
      if (wb_en)
        st_q[wb_idx] <= wb_data;
      if (ark_en)
        st_q[ark_idx][0] <= st_q[ark_idx][0] ^ ark_key;
    end
  end
endmodule
