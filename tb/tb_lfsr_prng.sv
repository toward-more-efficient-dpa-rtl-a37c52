// tb_lfsr_prng: loads a seed and checks that the output stream is the
// sequence b[n] = b[n-128] ^ b[n-126] ^ b[n-101] ^ b[n-99] started from the
// seed (seed bit 127 is the oldest bit), OUT_W new bits per cycle, output
// bit 0 first.  Also checks that an all-zero seed does not lock the
// generator and that the bits are roughly balanced.
module tb_lfsr_prng;
  localparam int OUT_W = 112;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0, seed_load = 0;
  logic [127:0] seed;
  logic [OUT_W-1:0] rnd;
  int checks = 0, failures = 0;

  lfsr_prng dut (.*);

  bit hist [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones = 0, total = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      seed = {$urandom, $urandom, $urandom, $urandom};
      seed_load = 1;
      @(negedge clk);
      seed_load = 0;
      hist.delete();
      for (int i = 127; i >= 0; i--) hist.push_back(seed[i]);
      for (int c = 0; c < 200; c++) begin
        for (int i = 0; i < OUT_W; i++) begin
          int n;
          bit e;
          n = hist.size();
          e = hist[n-128] ^ hist[n-126] ^ hist[n-101] ^ hist[n-99];
          hist.push_back(e);
          checks++;
          if (rnd[i] !== e) begin
            failures++;
            if (failures < 10) $display("seed %0d cycle %0d bit %0d mismatch", s, c, i);
          end
          ones += int'(rnd[i]);
          total++;
        end
        @(negedge clk);
      end
    end
    checks++;
    if (ones < total * 45 / 100 || ones > total * 55 / 100) failures++;
    // zero seed must not lock the generator
    seed = '0;
    seed_load = 1;
    @(negedge clk);
    seed_load = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (rnd == '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
