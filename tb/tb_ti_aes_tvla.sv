// tb_ti_aes_tvla: fixed-versus-random leakage test on simulated register
// values, the simulation counterpart of a TVLA power measurement.
// Encryptions with one fixed key are run in random order with either a
// fixed plaintext (FIPS-197 C.1) or a random one; every plaintext gets
// fresh random shares.  In each of the 217 cycles of an encryption the
// testbench records the Hamming weight of share 0 and of share 1 of the
// state register and, as a control, of the unmasked state (share0^share1).
// Welch's t statistic between the two groups must stay below 4.5 for both
// shares at every cycle (no first-order leakage in the register values),
// while the unmasked control must exceed 4.5 (the test can see leakage).
// This covers register values only; glitches and coupling in a real
// netlist are outside what a logic simulation can show.
// Each fixed-group ciphertext is also checked against the known answer.
module tb_ti_aes_tvla;
  logic clk = 0;
  always #5 clk = ~clk;

  logic         rst_n, start, prng_seed_load, busy, done;
  logic [127:0] pt_share0, pt_share1, key, prng_seed, ct_share0, ct_share1;
  int checks = 0, failures = 0;

  ti_aes_top dut (.*);

  localparam int NTRACE = 50000;
  localparam int NS = 217;          // samples per trace (cycles to done)
  localparam int NF = 3;            // share 0, share 1, unmasked control
  localparam logic [127:0] FIXED_PT = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] FIXED_K  = 128'h000102030405060708090a0b0c0d0e0f;
  localparam logic [127:0] FIXED_CT = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;

  real s1 [2][NS][NF];
  real s2 [2][NS][NF];
  int  cnt [2];

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (NTRACE * (NS + 4) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] st;
    logic [127:0] sh0, sh1, m;
    int g, n;
    real t, maxt_share, maxt_ctrl;
    rst_n = 0; start = 0; prng_seed_load = 0; prng_seed = '0;
    pt_share0 = '0; pt_share1 = '0; key = FIXED_K;
    for (int a = 0; a < 2; a++) begin
      cnt[a] = 0;
      for (int i = 0; i < NS; i++)
        for (int f = 0; f < NF; f++) begin s1[a][i][f] = 0.0; s2[a][i][f] = 0.0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    prng_seed = rand128();
    prng_seed_load = 1;
    @(negedge clk);
    prng_seed_load = 0;

    for (int tr = 0; tr < NTRACE; tr++) begin
      g = $urandom % 2;
      m = rand128();
      pt_share0 = (g == 0 ? FIXED_PT : rand128()) ^ m;
      pt_share1 = m;
      start = 1;
      @(negedge clk);
      start = 0;
      n = 0;
      while (!done) begin
        st = dut.u_state.st_q;
        for (int b = 0; b < 16; b++) begin
          sh0[8*b +: 8] = st[16*b +: 8];
          sh1[8*b +: 8] = st[16*b + 8 +: 8];
        end
        if (n < NS) begin
          real v [NF];
          v[0] = real'($countones(sh0));
          v[1] = real'($countones(sh1));
          v[2] = real'($countones(sh0 ^ sh1));
          for (int f = 0; f < NF; f++) begin
            s1[g][n][f] += v[f];
            s2[g][n][f] += v[f] * v[f];
          end
        end
        n++;
        @(negedge clk);
      end
      cnt[g]++;
      if (g == 0) begin
        checks++;
        if ((ct_share0 ^ ct_share1) !== FIXED_CT) failures++;
      end
    end

    maxt_share = 0.0;
    maxt_ctrl = 0.0;
    for (int i = 0; i < NS; i++) begin
      for (int f = 0; f < NF; f++) begin
        real m0, m1, v0, v1, den;
        m0 = s1[0][i][f] / cnt[0];
        m1 = s1[1][i][f] / cnt[1];
        v0 = s2[0][i][f] / cnt[0] - m0 * m0;
        v1 = s2[1][i][f] / cnt[1] - m1 * m1;
        den = v0 / cnt[0] + v1 / cnt[1];
        t = (den > 1e-12) ? (m0 - m1) / $sqrt(den) : 0.0;
        if (t < 0) t = -t;
        if (f < 2) begin
          checks++;
          if (t >= 4.5) begin
            failures++;
            $display("leakage: cycle %0d share %0d |t| = %f", i, f, t);
          end
          if (t > maxt_share) maxt_share = t;
        end else if (t > maxt_ctrl) begin
          maxt_ctrl = t;
        end
      end
    end
    checks++;
    if (maxt_ctrl < 4.5) failures++;
    $display("traces: fixed %0d random %0d; max |t| shares %f, unmasked control %f",
             cnt[0], cnt[1], maxt_share, maxt_ctrl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
