// tb_key_scheduler: runs the key scheduler through the byte-serial
// sequence the core uses (first round without update, then ten rounds of
// 16 updates), returning SubWord results through the write port three
// cycles after each request, as the S-box would.  Every key byte it
// presents is compared with a word-wise FIPS-197 key expansion written
// here; the FIPS-197 Appendix A.1 key gives the last round key
// d014f9a8 c9ee2589 e13f0cc8 b6630ca6.
module tb_key_scheduler;
  import ti_aes_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0, load = 0, upd_en = 0;
  logic sw_wr_en;
  state_t key_in;
  logic [3:0] idx = 0;
  byte_t key_byte, sw_byte, sw_wr_data;
  logic [1:0] sw_sel = 0, sw_wr_idx;
  int checks = 0, failures = 0;

  key_scheduler dut (.*);

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

  // word-wise expansion: w[i] 32-bit, big-endian bytes
  logic [31:0] w [44];
  task automatic expand(logic [127:0] k);
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = k[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t;
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]} ^ {rc, 24'h0};
        rc = gmul(rc, 2);
      end
      w[i] = w[i-4] ^ t;
    end
  endtask

  task automatic chk(logic ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // S-box return path: 3-cycle delay of sw requests
  logic [2:0] v_d; logic [1:0] i_d [3]; byte_t b_d [3];
  logic sw_req = 0;
  always @(posedge clk) begin
    v_d <= {v_d[1:0], sw_req};
    i_d[0] <= sw_sel; i_d[1] <= i_d[0]; i_d[2] <= i_d[1];
    b_d[0] <= sb[sw_byte]; b_d[1] <= b_d[0]; b_d[2] <= b_d[1];
  end
  assign sw_wr_en = v_d[2];
  assign sw_wr_idx = i_d[2];
  assign sw_wr_data = b_d[2];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k;
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv = 0, b;
      for (int c = 1; c < 256; c++) if (gmul(8'(x), 8'(c)) == 1) inv = 8'(c);
      b = inv;
      sb[x] = b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
    end
    v_d = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 6; it++) begin
      k = (it == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : {$urandom, $urandom, $urandom, $urandom};
      expand(k);
      if (it == 0) chk({w[40], w[41], w[42], w[43]} === 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "reference A.1");
      @(negedge clk);
      for (int i = 0; i < 16; i++) key_in[i] = k[127-8*i -: 8];
      load = 1;
      @(negedge clk);
      load = 0;
      for (int r = 0; r <= 10; r++) begin
        for (int c = 0; c < 20; c++) begin
          if (c < 16) begin
            idx = 4'(c); upd_en = (r != 0);
            #1;
            chk(key_byte === w[4*r + c/4][31 - 8*(c%4) -: 8], $sformatf("round key %0d byte %0d", r, c));
          end else begin
            upd_en = 0; sw_req = (r < 10); sw_sel = 2'(c - 16);
          end
          @(negedge clk);
          sw_req = 0; upd_en = 0;
          if (r == 10 && c == 15) break;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
