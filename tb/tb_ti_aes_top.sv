// tb_ti_aes_top: end-to-end test of the TI AES-128 core at its default
// parameters.  Encrypts the two FIPS-197 example vectors and a series of
// random plaintext/key pairs, each plaintext split into two random shares,
// and compares the recombined ciphertext with a plain reference AES-128
// written here (S-box from brute-force GF(2^8) inversion).  It also checks
//   - start-to-done latency (217 cycles) and the 20-cycle round period,
//   - that the ciphertext shares change between two encryptions of the
//     same input (fresh masks from the PRNG reach the output),
//   - that start is ignored while busy,
// and counts each mechanism of the schedule: first round without
// MixColumns, MixColumns-fed rounds, SubWord slots, S-box write-backs
// that overlap a new feed, ShiftRows, final AddRoundKey, reseeding.  A
// mechanism that never happens counts as a failure.
module tb_ti_aes_top;
  logic clk = 0;
  always #5 clk = ~clk;

  logic         rst_n, start, prng_seed_load, busy, done;
  logic [127:0] pt_share0, pt_share1, key, prng_seed, ct_share0, ct_share1;
  int checks = 0, failures = 0;

  ti_aes_top dut (.*);

  // ---------------- reference AES-128 ----------------
  logic [7:0] sb [256];

  function automatic logic [7:0] gmul(logic [7:0] x, logic [7:0] y);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (y[0]) r ^= x;
      x = (x << 1) ^ (x[7] ? 8'h1B : 8'h00);
      y = y >> 1;
    end
    return r;
  endfunction

  task automatic build_sbox();
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv = 0, b;
      for (int c = 1; c < 256; c++)
        if (gmul(8'(x), 8'(c)) == 8'h01) inv = 8'(c);
      b = inv;
      sb[x] = b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
    end
  endtask

  function automatic logic [127:0] ref_aes(logic [127:0] pt, logic [127:0] k);
    logic [7:0] s [16], t [16], rk [16];
    logic [7:0] rcon = 8'h01;
    for (int i = 0; i < 16; i++) begin
      s[i]  = pt[127-8*i -: 8];
      rk[i] = k[127-8*i -: 8];
      s[i] ^= rk[i];
    end
    for (int r = 1; r <= 10; r++) begin
      // key expansion
      logic [7:0] w [4];
      w[0] = sb[rk[13]] ^ rcon; w[1] = sb[rk[14]]; w[2] = sb[rk[15]]; w[3] = sb[rk[12]];
      for (int i = 0; i < 4; i++) rk[i] ^= w[i];
      for (int i = 4; i < 16; i++) rk[i] ^= rk[i-4];
      rcon = gmul(rcon, 8'h02);
      // SubBytes + ShiftRows
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++)
          t[4*c+row] = sb[s[4*((c+row)%4)+row]];
      // MixColumns
      if (r != 10) begin
        for (int c = 0; c < 4; c++)
          for (int row = 0; row < 4; row++)
            s[4*c+row] = gmul(t[4*c+row], 2) ^ gmul(t[4*c+(row+1)%4], 3) ^
                         t[4*c+(row+2)%4] ^ t[4*c+(row+3)%4];
      end else begin
        s = t;
      end
      for (int i = 0; i < 16; i++) s[i] ^= rk[i];
    end
    for (int i = 0; i < 16; i++) ref_aes[127-8*i -: 8] = s[i];
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // ---------------- mechanism counters ----------------
  int n_first_feed = 0, n_mc_feed = 0, n_subword = 0, n_overlap = 0;
  int n_sr = 0, n_final_ark = 0, n_reseed = 0, n_ignored_start = 0;
  int last_sr = -1, cyc = 0, sr_period_bad = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.feed_en && dut.first_round) n_first_feed++;
      if (dut.feed_en && !dut.first_round) n_mc_feed++;
      if (dut.sw_feed_en) n_subword++;
      if (dut.wb_en && dut.feed_en) n_overlap++;
      if (dut.fin_ark_en) n_final_ark++;
      if (dut.sr_en) begin
        n_sr++;
        if (last_sr >= 0 && dut.u_ctrl.round_q != 4'd1 && cyc - last_sr != 20) sr_period_bad++;
        last_sr = cyc;
      end
      if (prng_seed_load) n_reseed++;
      if (start && busy) n_ignored_start++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic encrypt(input logic [127:0] pt, input logic [127:0] k,
                         output logic [127:0] c0, output logic [127:0] c1, output int lat);
    logic [127:0] m;
    m = rand128();
    @(negedge clk);
    pt_share0 = pt ^ m;
    pt_share1 = m;
    key       = k;
    start     = 1;
    @(negedge clk);
    start     = 0;
    pt_share0 = rand128();   // inputs are only sampled at start
    pt_share1 = rand128();
    key       = rand128();
    lat = 1;
    while (!done) begin
      // a start while busy must be ignored
      if (lat == 50) begin
        start = 1;
        @(negedge clk);
        start = 0;
        lat++;
        continue;
      end
      @(negedge clk);
      lat++;
    end
    c0 = ct_share0;
    c1 = ct_share1;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NRAND = 40;

  initial begin
    logic [127:0] c0, c1, c0b, c1b, exp_ct, pt, k;
    int lat;
    rst_n = 0; start = 0; prng_seed_load = 0; prng_seed = '0;
    pt_share0 = '0; pt_share1 = '0; key = '0;
    build_sbox();
    repeat (3) @(negedge clk);
    rst_n = 1;
    prng_seed = 128'hC0FF_EE00_1234_5678_9ABC_DEF0_0F1E_2D3C;
    prng_seed_load = 1;
    @(negedge clk);
    prng_seed_load = 0;

    // FIPS-197 Appendix C.1
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, c0, c1, lat);
    check("FIPS-197 C.1", (c0 ^ c1) === 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    check("latency 217", lat == 217);
    if (lat != 217) $display("latency %0d", lat);
    // FIPS-197 Appendix B
    exp_ct = 128'h3925841d02dc09fbdc118597196a0b32;
    check("reference model on Appendix B", ref_aes(128'h3243f6a8885a308d313198a2e0370734,
                                                   128'h2b7e151628aed2a6abf7158809cf4f3c) === exp_ct);
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, c0, c1, lat);
    check("FIPS-197 B", (c0 ^ c1) === exp_ct);
    // same input again: same ciphertext, different shares
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c, c0b, c1b, lat);
    check("FIPS-197 B repeated", (c0b ^ c1b) === exp_ct);
    check("output shares re-randomised", c0b !== c0);
    check("output share 1 not zero", c1b !== '0);

    for (int n = 0; n < NRAND; n++) begin
      pt = rand128();
      k  = rand128();
      if (n == NRAND / 2) begin
        @(negedge clk);
        prng_seed = rand128();
        prng_seed_load = 1;
        @(negedge clk);
        prng_seed_load = 0;
      end
      encrypt(pt, k, c0, c1, lat);
      exp_ct = ref_aes(pt, k);
      check($sformatf("random %0d", n), (c0 ^ c1) === exp_ct);
      check("latency", lat == 217);
    end

    check("round period 20 cycles", sr_period_bad == 0);
    $display("mechanisms: first_round_feeds=%0d mixcolumns_feeds=%0d subword_feeds=%0d overlap=%0d shiftrows=%0d final_ark=%0d reseed=%0d ignored_start=%0d",
             n_first_feed, n_mc_feed, n_subword, n_overlap, n_sr, n_final_ark, n_reseed, n_ignored_start);
    check("first-round feeds happened", n_first_feed == 16 * (NRAND + 3));
    check("MixColumns feeds happened", n_mc_feed == 16 * 9 * (NRAND + 3));
    check("SubWord feeds happened", n_subword == 4 * 10 * (NRAND + 3));
    check("write-back overlapped feed", n_overlap > 0);
    check("ShiftRows count", n_sr == 10 * (NRAND + 3));
    check("final ARK count", n_final_ark == 16 * (NRAND + 3));
    check("reseed happened", n_reseed == 2);
    check("start while busy seen", n_ignored_start > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
