// tb_sbox_affine: checks the output stage of the S-box.  Each AES-field
// byte a is mapped to the tower field by gf_iso, split into random shares
// and fed to sbox_affine; the XOR of its output shares must be the
// FIPS-197 affine transform of a (a ^ rotl(a,1..4) ^ 8'h63), computed here
// with rotations.  Share 1 alone must never carry the constant: with a
// zero share-1 input its output must be zero.
module tb_sbox_affine;
  import ti_aes_pkg::*;
  sbyte_t a, t, tin, s;
  int checks = 0, failures = 0;

  gf_iso      u_iso (.a(a), .t(t));
  sbox_affine dut   (.t(tin), .s(s));

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 256; v++) begin
        logic [7:0] b, m, e;
        b = 8'(v);
        e = b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
        a[0] = b; a[1] = 8'h00; #1;
        m = (rep == 0) ? 8'h00 : 8'($urandom);
        tin[0] = t[0] ^ m; tin[1] = m; #1;
        checks++;
        if ((s[0] ^ s[1]) !== e) begin
          failures++;
          if (failures < 10) $display("a=%02h got %02h exp %02h", b, s[0]^s[1], e);
        end
        if (rep == 0) begin
          checks++;
          if (s[1] !== 8'h00) failures++;
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
