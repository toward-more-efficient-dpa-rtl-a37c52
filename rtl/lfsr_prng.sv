// lfsr_prng: pseudo-random source for the masks of the TI S-box.
// A 128-bit Fibonacci LFSR with feedback polynomial
// x^128 + x^126 + x^101 + x^99 + 1 (maximal length) is advanced OUT_W
// steps per clock; the OUT_W feedback bits of those steps form rnd, so
// every cycle delivers OUT_W new bits of the bit sequence
//   b[n] = b[n-128] ^ b[n-126] ^ b[n-101] ^ b[n-99].
// In the register, bit 0 is the newest bit and bit 127 the oldest.
// seed_load replaces the register with seed (an all-zero seed, which
// would lock the LFSR, is replaced by RESET_VALUE).  rnd is the
// combinational output of the current state, so it changes every cycle.
// An LFSR-based generator follows the architecture; the polynomial, the
// width and the leap-forward structure are this design's choices.
module lfsr_prng #(
  parameter int unsigned OUT_W = 112,
  parameter logic [127:0] RESET_VALUE = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             seed_load,
  input  logic [127:0]     seed,
  output logic [OUT_W-1:0] rnd
);
  logic [127:0] s_q, s_next;

  always_comb begin
    logic [127:0] s;
    logic         fb;
    s = s_q;
    for (int i = 0; i < OUT_W; i++) begin
      fb     = s[127] ^ s[125] ^ s[100] ^ s[98];
      rnd[i] = fb;
      s      = {s[126:0], fb};
    end
    s_next = s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      s_q <= RESET_VALUE;
    else if (seed_load)
      s_q <= (seed == '0) ? RESET_VALUE : seed;
    else
      s_q <= s_next;
  end
endmodule
