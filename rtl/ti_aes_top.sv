// ti_aes_top: first-order threshold-implementation AES-128 encryption core
// with a byte-serial datapath and a single shared TI S-box.
//
// The plaintext enters as two 128-bit Boolean shares (pt = pt_share0 ^
// pt_share1) and the ciphertext leaves as two shares; the key and the key
// schedule are unmasked.  One TI S-box (isomorphism, 3-stage TI inversion,
// affine) serves both SubBytes (16 bytes per round) and the key
// schedule's SubWord (4 bytes per round), so a round takes 20 cycles.
// Around it: the shared state array, a MixColumns unit that produces one
// output byte per cycle right in front of the S-box, the byte-serial key
// scheduler, the LFSR mask generator and the sequencer.
//
// Interface: 128-bit values in FIPS-197 byte order (byte 0 in bits
// 127:120).  Pulse start for one cycle while busy is low; pt_share*, key
// are sampled on that edge.  done pulses 217 cycles later, and ct_share0/1
// hold the result until the next start.  prng_seed_load reseeds the mask
// generator.  Reset is asynchronous, active low.
//
// Data flow in round r (controller cycle c = 0..15):
//   S-box input = (r == 1 ? state[c] : MixColumnsRow(column c/4, row c%4))
//                 ^ round-key byte c                (key on share 0 only)
//   SBOX_LAT cycles later the S-box output is written back to state[c];
//   at c = 19 ShiftRows is applied to the whole state.  After round 10 a
//   16-cycle phase adds the last round key byte by byte.
module ti_aes_top
  import ti_aes_pkg::*;
#(
  parameter int unsigned NUM_ROUNDS = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] pt_share0,
  input  logic [127:0] pt_share1,
  input  logic [127:0] key,
  input  logic         prng_seed_load,
  input  logic [127:0] prng_seed,
  output logic         busy,
  output logic         done,
  output logic [127:0] ct_share0,
  output logic [127:0] ct_share1
);
  // controller
  logic       load, first_round, feed_en, key_upd_en, sw_feed_en, sr_en, fin_ark_en;
  logic       wb_en, sw_wr_en;
  logic [3:0] idx, wb_idx;
  logic [1:0] sw_sel, sw_wr_idx;

  aes_controller #(.NUM_ROUNDS(NUM_ROUNDS)) u_ctrl (
    .clk, .rst_n, .start, .load, .busy, .done, .idx, .first_round,
    .feed_en, .key_upd_en, .sw_feed_en, .sw_sel, .sr_en, .fin_ark_en,
    .wb_en, .wb_idx, .sw_wr_en, .sw_wr_idx
  );

  // byte-order conversion
  sstate_t pt_sh;
  state_t  key_bytes;
  sstate_t st;
  always_comb begin
    for (int i = 0; i < 16; i++) begin
      pt_sh[i][0]  = pt_share0[127 - 8*i -: 8];
      pt_sh[i][1]  = pt_share1[127 - 8*i -: 8];
      key_bytes[i] = key[127 - 8*i -: 8];
      ct_share0[127 - 8*i -: 8] = st[i][0];
      ct_share1[127 - 8*i -: 8] = st[i][1];
    end
  end

  // state array
  sbyte_t rd_byte, sbox_out;
  scol_t  rd_col;
  byte_t  key_byte;

  state_array u_state (
    .clk, .load, .load_data(pt_sh), .rd_idx(idx), .rd_byte, .rd_col,
    .wb_en, .wb_idx, .wb_data(sbox_out), .sr_en,
    .ark_en(fin_ark_en), .ark_idx(idx), .ark_key(key_byte), .state(st)
  );

  // MixColumns, one row per cycle
  sbyte_t mc_byte;
  mixcolumns_row u_mc (.col(rd_col), .row(idx[1:0]), .y(mc_byte));

  // key scheduler
  byte_t sw_byte;
  key_scheduler u_key (
    .clk, .rst_n, .load, .key_in(key_bytes), .upd_en(key_upd_en), .idx,
    .key_byte, .sw_sel, .sw_byte, .sw_wr_en, .sw_wr_idx,
    .sw_wr_data(sbox_out[0] ^ sbox_out[1])
  );

  // S-box input selection
  sbyte_t sbox_in;
  always_comb begin
    sbox_in = '0;
    if (feed_en) begin
      sbox_in    = first_round ? rd_byte : mc_byte;
      sbox_in[0] = sbox_in[0] ^ key_byte;
    end else if (sw_feed_en) begin
      sbox_in[0] = sw_byte;
    end
  end

  // mask generator and shared S-box
  logic [SBOX_RND_W-1:0] rnd;
  lfsr_prng #(.OUT_W(SBOX_RND_W)) u_prng (
    .clk, .rst_n, .seed_load(prng_seed_load), .seed(prng_seed), .rnd
  );

  ti_sbox u_sbox (.clk, .a(sbox_in), .rnd, .s(sbox_out));

endmodule
