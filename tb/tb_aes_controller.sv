// tb_aes_controller: checks every control output of the sequencer, cycle
// by cycle, against the schedule written out here: with n counting cycles
// after the start edge, round r = n/20 + 1 and round cycle c = n % 20 for
// n < 200, the final key-addition phase for n = 200..215, done at n = 216.
// Write-back strobes must repeat the feed strobes exactly three cycles
// later.  A start while busy must be ignored.
module tb_aes_controller;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0, start = 0;
  logic load, busy, done, first_round, feed_en, key_upd_en, sw_feed_en, sr_en, fin_ark_en;
  logic wb_en, sw_wr_en;
  logic [3:0] idx, wb_idx;
  logic [1:0] sw_sel, sw_wr_idx;
  int checks = 0, failures = 0;

  aes_controller dut (.*);

  // expected strobes by n
  function automatic logic [31:0] exp_vec(int n);
    logic in_round, in_final, f, s;
    int c;
    in_round = (n >= 0 && n < 200);
    in_final = (n >= 200 && n < 216);
    c = in_round ? n % 20 : (in_final ? n - 200 : 0);
    f = in_round && c < 16;
    s = in_round && c >= 16;
    return {12'b0,
            1'(n >= 0 && n < 216),          // busy
            1'(n == 216),                   // done
            4'(c),                          // idx
            1'(in_round && n < 20),         // first_round
            1'(f),                          // feed_en
            1'((f && n >= 20) || in_final), // key_upd_en
            1'(s),                          // sw_feed_en
            2'(c - 16),                     // sw_sel
            1'(in_round && c == 19),        // sr_en
            1'(in_final)};                  // fin_ark_en
  endfunction

  function automatic logic [31:0] got_vec();
    return {12'b0, busy, done, idx, first_round, feed_en, key_upd_en, sw_feed_en,
            sw_sel, sr_en, fin_ark_en};
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e, g;
    int hist_f [$], hist_s [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int op = 0; op < 3; op++) begin
      repeat (op * 3) @(negedge clk);
      checks++;
      if (busy || load) failures++;
      start = 1; #1;
      checks++;
      if (!load) failures++;
      @(negedge clk);
      start = 0;
      hist_f.delete(); hist_s.delete();
      for (int n = 0; n <= 220; n++) begin
        if (n == 30 || n == 205) start = 1;   // ignored: busy
        #1;
        checks++;
        if (load) failures++;
        e = exp_vec(n);
        g = got_vec();
        // sw_sel is only defined while sw_feed_en is high
        if (!e[3]) begin e[2:1] = 0; g[2:1] = 0; end
        // idx is only defined in the round/final phases
        if (n >= 216) begin e[15:12] = 0; g[15:12] = 0; end
        checks++;
        if (g !== e) begin
          failures++;
          if (failures < 8) $display("n=%0d got %h exp %h", n, g, e);
        end
        // write-back = feed three cycles earlier
        hist_f.push_back(feed_en ? 16 + int'(idx) : 0);
        hist_s.push_back(sw_feed_en ? 4 + int'(sw_sel) : 0);
        if (n >= 3) begin
          checks++;
          if ((wb_en ? 16 + int'(wb_idx) : 0) != hist_f[n-3] ||
              (sw_wr_en ? 4 + int'(sw_wr_idx) : 0) != hist_s[n-3]) begin
            failures++;
            if (failures < 8) $display("n=%0d write-back mismatch", n);
          end
        end
        @(negedge clk);
        start = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
