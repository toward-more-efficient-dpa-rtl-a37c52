// tb_state_array: drives the shared state register through load, reads,
// byte write-back, ShiftRows and key addition, and compares every byte and
// share with a model array kept in the testbench.  ShiftRows is checked
// against the FIPS-197 rule: new row r, column c = old row r, column c+r.
module tb_state_array;
  import ti_aes_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic load = 0, wb_en = 0, sr_en = 0, ark_en = 0;
  sstate_t load_data, state;
  logic [3:0] rd_idx = 0, wb_idx = 0, ark_idx = 0;
  sbyte_t rd_byte, wb_data;
  scol_t rd_col;
  byte_t ark_key;
  int checks = 0, failures = 0;
  sstate_t model;

  state_array dut (.*);

  task automatic chk(logic ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic compare_all(string stage);
    chk(state === model, {"state after ", stage});
    for (int i = 0; i < 16; i++) begin
      rd_idx = 4'(i); #1;
      chk(rd_byte === model[i], "rd_byte");
      for (int r = 0; r < 4; r++) chk(rd_col[r] === model[4*(i/4) + r], "rd_col");
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 20; it++) begin
      @(negedge clk);
      for (int i = 0; i < 16; i++) load_data[i] = {8'($urandom), 8'($urandom)};
      load = 1;
      @(negedge clk);
      load = 0;
      model = load_data;
      compare_all("load");
      // byte write-backs
      for (int n = 0; n < 16; n++) begin
        wb_en = 1; wb_idx = 4'($urandom); wb_data = {8'($urandom), 8'($urandom)};
        @(negedge clk);
        model[wb_idx] = wb_data;
        wb_en = 0;
      end
      compare_all("write-back");
      // ShiftRows
      sr_en = 1;
      @(negedge clk);
      sr_en = 0;
      begin
        sstate_t old;
        old = model;
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            model[4*c + r] = old[4*((c + r) % 4) + r];
      end
      compare_all("ShiftRows");
      // key addition on share 0
      for (int n = 0; n < 16; n++) begin
        ark_en = 1; ark_idx = 4'(n); ark_key = 8'($urandom);
        @(negedge clk);
        model[n][0] = model[n][0] ^ ark_key;
        ark_en = 0;
      end
      compare_all("key addition");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
