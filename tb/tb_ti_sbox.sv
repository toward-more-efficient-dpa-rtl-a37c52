// tb_ti_sbox: self-checking test of the stand-alone TI S-box.
// Every byte value (and then random ones) is split into two random shares
// and applied one per cycle with fresh random masks.  Exactly three cycles
// later the XOR of the output shares must equal the AES S-box value, which
// the testbench computes itself by brute-force inversion in GF(2^8) and the
// FIPS-197 affine transform.
module tb_ti_sbox;
  import ti_aes_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  sbyte_t a, s;
  logic [SBOX_RND_W-1:0] rnd;
  int checks = 0, failures = 0;

  ti_sbox dut (.clk(clk), .a(a), .rnd(rnd), .s(s));

  function automatic logic [7:0] ref_mul(logic [7:0] x, logic [7:0] y);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (y[0]) r ^= x;
      x = (x << 1) ^ (x[7] ? 8'h1B : 8'h00);
      y = y >> 1;
    end
    return r;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] inv = 0, b;
    for (int c = 1; c < 256; c++)
      if (ref_mul(x, 8'(c)) == 8'h01) inv = 8'(c);
    b = inv;
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  function automatic logic [SBOX_RND_W-1:0] rand_masks();
    logic [SBOX_RND_W-1:0] r;
    for (int i = 0; i < SBOX_RND_W; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  localparam int N = 256 + 200;
  logic [7:0] expq [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v, m, got, exp_v;
    a = '0; rnd = '0;
    for (int n = 0; n < N + SBOX_LAT; n++) begin
      if (n < N) begin
        v = (n < 256) ? 8'(n) : 8'($urandom);
        m = 8'($urandom);
        a[0] = v ^ m;
        a[1] = m;
        expq.push_back(ref_sbox(v));
      end
      rnd = rand_masks();
      @(posedge clk);
      #1;
      // result of the input applied SBOX_LAT cycles ago is now visible
      if (n >= SBOX_LAT - 1 && expq.size() > 0 && n - (SBOX_LAT - 1) < N) begin
        got = s[0] ^ s[1];
        exp_v = expq.pop_front();
        checks++;
        if (got !== exp_v) begin
          failures++;
          if (failures < 10) $display("mismatch item %0d: got %02h exp %02h", n - SBOX_LAT + 1, got, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
