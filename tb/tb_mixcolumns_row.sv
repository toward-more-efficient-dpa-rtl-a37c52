// tb_mixcolumns_row: random shared columns; for every row the XOR of the
// output shares must equal that row of MixColumns of the recombined
// column, computed here with a generic GF(2^8) multiplier.  Also the
// FIPS-197 column db 13 53 45 -> 8e 4d a1 bc.
module tb_mixcolumns_row;
  import ti_aes_pkg::*;
  scol_t col;
  logic [1:0] row;
  sbyte_t y;
  int checks = 0, failures = 0;

  mixcolumns_row dut (.col(col), .row(row), .y(y));

  function automatic logic [7:0] gmul(logic [7:0] x, logic [7:0] z);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (z[0]) r ^= x;
      x = (x << 1) ^ (x[7] ? 8'h1B : 8'h00);
      z = z >> 1;
    end
    return r;
  endfunction

  initial begin
    logic [7:0] c [4];
    logic [7:0] known_in [4] = '{8'hdb, 8'h13, 8'h53, 8'h45};
    logic [7:0] known_out [4] = '{8'h8e, 8'h4d, 8'ha1, 8'hbc};
    for (int n = 0; n < 1001; n++) begin
      for (int r = 0; r < 4; r++) begin
        logic [7:0] m;
        c[r] = (n == 0) ? known_in[r] : 8'($urandom);
        m = 8'($urandom);
        col[r][0] = c[r] ^ m; col[r][1] = m;
      end
      for (int r = 0; r < 4; r++) begin
        logic [7:0] e;
        row = 2'(r); #1;
        e = gmul(c[r], 2) ^ gmul(c[(r+1)%4], 3) ^ c[(r+2)%4] ^ c[(r+3)%4];
        checks++;
        if ((y[0] ^ y[1]) !== e || (n == 0 && e !== known_out[r])) begin
          failures++;
          if (failures < 10) $display("n=%0d row %0d got %02h exp %02h", n, r, y[0]^y[1], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
