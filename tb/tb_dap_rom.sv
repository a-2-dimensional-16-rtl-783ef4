// tb_dap_rom: checks every word of the ROMs of DA processors 0, 5 and 14 against the partial
// sums of the rounded MSDCT coefficients, recomputed here, and that they fit 10 signed bits.
module tb_dap_rom;
  import tb_dct_ref_pkg::*;
  logic [7:0] addr;
  logic [9:0] d0, d5, d14;
  int checks = 0, failures = 0;

  dap_rom #(.K(0))  u0  (.addr, .data(d0));
  dap_rom #(.K(5))  u5  (.addr, .data(d5));
  dap_rom #(.K(14)) u14 (.addr, .data(d14));

  function automatic int expect_word(int k, int a);
    int s = 0;
    for (int n = 0; n < 8; n++) if (a[n]) s += ref_coef(k, n);
    return s;
  endfunction

  task automatic check(int k, logic [9:0] d, int a);
    int e = expect_word(k, a);
    checks++;
    if (e > 511 || e < -512 || $signed(d) != e) begin
      failures++;
      $display("ROM %0d addr %0d: got %0d expected %0d", k, a, $signed(d), e);
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      #1;
      check(0, d0, a); check(5, d5, a); check(14, d14, a);
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
