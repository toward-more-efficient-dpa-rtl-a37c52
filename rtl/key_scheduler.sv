// key_scheduler: byte-serial AES-128 key expansion on an unmasked key.
// The key registers hold the current round key k_(r-1), byte i at word
// i/4, position i%4.  When upd_en is high, byte idx is replaced by the
// next round key byte:
//   idx 0..3  : k'[idx] = k[idx] ^ SubWord(RotWord(w3))[idx] ^ (idx==0 ? rcon : 0)
//   idx 4..15 : k'[idx] = k[idx] ^ k'[idx-4]   (byte written 4 cycles earlier)
// and key_byte presents that new byte in the same cycle, so it can be
// added to the state while it is being produced.  With upd_en low,
// key_byte is the stored byte (the cipher key in the first round).
// rcon doubles in GF(2^8) after every update of byte 0.
//
// SubWord uses the core's shared S-box: sw_byte is key byte 13,14,15,12
// for sw_sel = 0..3 (RotWord order), and the S-box result comes back
// through sw_wr_en/sw_wr_idx into a 4-byte buffer read by the next
// updates of bytes 0..3.
// The key path carries no masking; the S-box returns two shares that the
// core XORs together before sw_wr_data.
module key_scheduler
  import ti_aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  state_t     key_in,
  input  logic       upd_en,
  input  logic [3:0] idx,
  output byte_t      key_byte,
  input  logic [1:0] sw_sel,
  output byte_t      sw_byte,
  input  logic       sw_wr_en,
  input  logic [1:0] sw_wr_idx,
  input  byte_t      sw_wr_data
);
  state_t key_q;
  byte_t  sw_q [4];
  byte_t  rcon_q;
  byte_t  k_new;

  always_comb begin
    if (idx < 4'd4)
      k_new = key_q[idx] ^ sw_q[idx[1:0]] ^ ((idx == 4'd0) ? rcon_q : 8'h00);
    else
      k_new = key_q[idx] ^ key_q[idx - 4'd4];
  end

  assign key_byte = upd_en ? k_new : key_q[idx];
  assign sw_byte  = key_q[{2'b11, 2'(sw_sel + 2'd1)}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q  <= '0;
      rcon_q <= 8'h01;
      for (int j = 0; j < 4; j++) sw_q[j] <= '0;
    end else begin
      if (load) begin
        key_q  <= key_in;
        rcon_q <= 8'h01;
      end else if (upd_en) begin
        key_q[idx] <= k_new;
        if (idx == 4'd0) rcon_q <= xtime(rcon_q);
      end
      if (sw_wr_en) sw_q[sw_wr_idx] <= sw_wr_data;
    end
  end
endmodule
