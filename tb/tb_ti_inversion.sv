// tb_ti_inversion: self-checking test of the 2-share TI inversion on
// tower-field bytes.  All 256 values (then random ones) are split into
// random shares and applied one per cycle with random masks.  Three cycles
// later the XOR of the output shares must be the tower-field inverse,
// found here by brute force with an independent tower multiplier
// (GF(2^4) mod w^4+w+1, Y^2 = Y + w^3).  A second pass with all masks at
// zero checks that the refresh masks cancel, and output share 1 must vary.
module tb_ti_inversion;
  import ti_aes_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  sbyte_t x, y;
  logic [SBOX_RND_W-1:0] rnd;
  int checks = 0, failures = 0;

  ti_inversion dut (.clk(clk), .x(x), .rnd(rnd), .y(y));

  function automatic logic [3:0] m4(logic [3:0] a, logic [3:0] b);
    logic [3:0] r = 0;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) r ^= a;
      a = {a[2:0], 1'b0} ^ (a[3] ? 4'b0011 : 4'b0000);
    end
    return r;
  endfunction

  function automatic logic [7:0] m8(logic [7:0] a, logic [7:0] b);
    logic [3:0] hh;
    hh = m4(a[7:4], b[7:4]);
    return {hh ^ m4(a[7:4], b[3:0]) ^ m4(a[3:0], b[7:4]), m4(hh, 4'h8) ^ m4(a[3:0], b[3:0])};
  endfunction

  function automatic logic [7:0] ref_inv(logic [7:0] a);
    for (int c = 1; c < 256; c++)
      if (m8(a, 8'(c)) == 8'h01) return 8'(c);
    return 8'h00;
  endfunction

  logic [7:0] expq [$];
  int share1_changes = 0;
  logic [7:0] last_s1 = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v, m;
    int nin;
    x = '0; rnd = '0;
    for (int pass = 0; pass < 2; pass++) begin
      nin = (pass == 0) ? 400 : 256;
      for (int n = 0; n < nin + SBOX_LAT; n++) begin
        if (n < nin) begin
          v = (n < 256) ? 8'(n) : 8'($urandom);
          m = 8'($urandom);
          x[0] = v ^ m; x[1] = m;
          expq.push_back(ref_inv(v));
        end
        for (int i = 0; i < SBOX_RND_W; i += 32)
          rnd[i +: 32] = (pass == 0) ? $urandom : 0;
        @(posedge clk); #1;
        if (n >= SBOX_LAT - 1 && n - (SBOX_LAT - 1) < nin) begin
          logic [7:0] e;
          e = expq.pop_front();
          checks++;
          if ((y[0] ^ y[1]) !== e) begin
            failures++;
            if (failures < 10) $display("pass %0d item %0d: got %02h exp %02h", pass, n-2, y[0]^y[1], e);
          end
          if (y[1] != last_s1) share1_changes++;
          last_s1 = y[1];
        end
      end
    end
    checks++;
    if (share1_changes < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
