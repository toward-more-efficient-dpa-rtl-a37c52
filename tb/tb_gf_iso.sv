// tb_gf_iso: checks that the share-wise map from the AES field to the
// tower field is a field isomorphism, without using its constants:
// it must be a bijection, map 1 to 1, keep XOR (linearity) and turn
// AES-field products (mod x^8+x^4+x^3+x+1) into tower-field products
// (GF(2^4) mod w^4+w+1, Y^2 = Y + w^3).  Shares are checked separately:
// the map of (a^m, m) must be (iso(a)^iso(m), iso(m)).
module tb_gf_iso;
  import ti_aes_pkg::*;
  sbyte_t a, t;
  int checks = 0, failures = 0;

  gf_iso dut_a (.a(a), .t(t));

  function automatic logic [7:0] gmul(logic [7:0] x, logic [7:0] y);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (y[0]) r ^= x;
      x = (x << 1) ^ (x[7] ? 8'h1B : 8'h00);
      y = y >> 1;
    end
    return r;
  endfunction
  function automatic logic [3:0] m4(logic [3:0] p, logic [3:0] q);
    logic [3:0] r = 0;
    for (int i = 0; i < 4; i++) begin
      if (q[i]) r ^= p;
      p = {p[2:0], 1'b0} ^ (p[3] ? 4'b0011 : 4'b0000);
    end
    return r;
  endfunction
  function automatic logic [7:0] m8(logic [7:0] p, logic [7:0] q);
    logic [3:0] hh;
    hh = m4(p[7:4], q[7:4]);
    return {hh ^ m4(p[7:4], q[3:0]) ^ m4(p[3:0], q[7:4]), m4(hh, 4'h8) ^ m4(p[3:0], q[3:0])};
  endfunction

  task automatic chk(logic ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    logic [7:0] img [256];
    bit seen [256];
    // bijection and 1 -> 1, and share-wise application
    for (int v = 0; v < 256; v++) begin
      logic [7:0] m;
      m = 8'($urandom);
      a[0] = 8'(v); a[1] = 8'h00; #1;
      img[v] = t[0];
      chk(t[1] == 8'h00, "share 1 of zero stays zero");
      a[0] = 8'(v) ^ m; a[1] = m; #1;
      chk((t[0] ^ t[1]) == img[v], "shares recombine");
    end
    for (int v = 0; v < 256; v++) seen[v] = 0;
    for (int v = 0; v < 256; v++) seen[img[v]] = 1;
    for (int v = 0; v < 256; v++) chk(seen[v], "bijective");
    chk(img[1] == 8'h01, "one maps to one");
    // homomorphism
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] p, q;
      p = 8'($urandom); q = 8'($urandom);
      chk(img[p ^ q] == (img[p] ^ img[q]), "additive");
      chk(img[gmul(p, q)] == m8(img[p], img[q]), "multiplicative");
    end
    #1;
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
