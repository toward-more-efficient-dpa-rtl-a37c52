// aes_controller: sequencer of the byte-serial TI AES core.
//
// One encryption = load, NUM_ROUNDS rounds of 20 cycles, then a 16-cycle
// final AddRoundKey phase.  Inside a round, cycle c (0..19):
//   c = 0..15   state byte c enters the S-box (feed_en, idx = c).  In the
//               first round it is state ^ k0; later it is one MixColumns
//               row of the stored column c/4, XOR the round key byte that
//               the key scheduler produces in the same cycle (key_upd_en).
//   c = 16..19  key bytes 13,14,15,12 enter the S-box for SubWord
//               (sw_feed_en, sw_sel = c-16).
//   c = 19      ShiftRows on the whole state (sr_en).
// S-box results return SBOX_LAT cycles after their feed; a delay line
// turns every feed into the matching write-back (wb_en/wb_idx for state
// bytes at c = 3..18, sw_wr_en/sw_wr_idx for SubWord bytes at c = 19 and
// cycles 0..2 of the next round or final phase).  Thus Inversion/Affine of
// one byte, MixColumns of the next and ShiftRows all overlap, and the
// pipeline latency is paid once per round inside the SubWord slots.
// Final phase, cycle c = 0..15: key byte c of the last round key is made
// and XORed into state byte c (fin_ark_en).  done pulses for one cycle
// after the last of these edges, when the state holds the ciphertext.
//
// Timing: start is taken in IDLE; busy is high from the next cycle until
// done.  Start-to-done latency is 1 + 20*NUM_ROUNDS + 16 cycles = 217
// clock edges for AES-128.  The 20-cycle round (16 SubBytes + 4 SubWord
// slots on one inversion) follows the architecture; the exact placement
// of ShiftRows, the byte-wise MixColumns and the final phase are this
// design's choices.
module aes_controller
  import ti_aes_pkg::*;
#(
  parameter int unsigned NUM_ROUNDS = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       load,         // load plaintext and key (start accepted)
  output logic       busy,
  output logic       done,
  output logic [3:0] idx,          // byte index for feed / key / final ARK
  output logic       first_round,
  output logic       feed_en,
  output logic       key_upd_en,
  output logic       sw_feed_en,
  output logic [1:0] sw_sel,
  output logic       sr_en,
  output logic       fin_ark_en,
  output logic       wb_en,
  output logic [3:0] wb_idx,
  output logic       sw_wr_en,
  output logic [1:0] sw_wr_idx
);
  typedef enum logic [1:0] {IDLE, ROUND, FINAL} phase_e;

  phase_e     phase_q;
  logic [4:0] cyc_q;
  logic [3:0] round_q;
  logic       done_q;

  // S-box return delay line: {state feed valid, subword valid, index}
  typedef struct packed {
    logic       st;
    logic       sw;
    logic [3:0] idx;
  } ret_t;
  ret_t ret_q [SBOX_LAT];
  ret_t ret_in;

  assign load        = (phase_q == IDLE) && start;
  assign busy        = (phase_q != IDLE);
  assign done        = done_q;
  assign idx         = cyc_q[3:0];
  assign first_round = (round_q == 4'd1);
  assign feed_en     = (phase_q == ROUND) && (cyc_q < 5'd16);
  assign key_upd_en  = (feed_en && !first_round) || fin_ark_en;
  assign sw_feed_en  = (phase_q == ROUND) && (cyc_q >= 5'd16);
  assign sw_sel      = cyc_q[1:0];
  assign sr_en       = (phase_q == ROUND) && (cyc_q == 5'd19);
  assign fin_ark_en  = (phase_q == FINAL);

  always_comb begin
    ret_in.st  = feed_en;
    ret_in.sw  = sw_feed_en;
    ret_in.idx = feed_en ? cyc_q[3:0] : {2'b00, cyc_q[1:0]};
  end

  assign wb_en     = ret_q[SBOX_LAT-1].st;
  assign wb_idx    = ret_q[SBOX_LAT-1].idx;
  assign sw_wr_en  = ret_q[SBOX_LAT-1].sw;
  assign sw_wr_idx = ret_q[SBOX_LAT-1].idx[1:0];

  // The delay line is SBOX_LAT deep and its last entry is used in the
  // cycle the S-box output of that feed is valid: entry k holds the feed
  // of k+1 cycles ago, so entry SBOX_LAT-1 is the feed SBOX_LAT cycles ago.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < SBOX_LAT; k++) ret_q[k] <= '0;
    end else begin
      ret_q[0] <= ret_in;
      for (int k = 1; k < SBOX_LAT; k++) ret_q[k] <= ret_q[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= IDLE;
      cyc_q   <= '0;
      round_q <= '0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (phase_q)
        IDLE: if (start) begin
          phase_q <= ROUND;
          cyc_q   <= '0;
          round_q <= 4'd1;
        end
        ROUND: begin
          if (cyc_q == 5'd19) begin
            cyc_q <= '0;
            if (round_q == 4'(NUM_ROUNDS)) phase_q <= FINAL;
            else round_q <= round_q + 4'd1;
          end else begin
            cyc_q <= cyc_q + 5'd1;
          end
        end
        FINAL: begin
          if (cyc_q == 5'd15) begin
            phase_q <= IDLE;
            cyc_q   <= '0;
            round_q <= '0;
            done_q  <= 1'b1;
          end else begin
            cyc_q <= cyc_q + 5'd1;
          end
        end
        default: phase_q <= IDLE;
      endcase
    end
  end

  // A write-back never collides with ShiftRows or with the final ARK.
  assert property (@(posedge clk) disable iff (!rst_n) !(wb_en && (sr_en || fin_ark_en)));
  assert property (@(posedge clk) disable iff (!rst_n) !(feed_en && sw_feed_en));
endmodule
