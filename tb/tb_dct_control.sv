// tb_dct_control: runs the control unit for 3 frames and compares every output, every cycle,
// with a schedule computed here from the cycle number t alone: slot = t/16, period = t/32,
// row slot in the first half of a period; IRM row written in period p is (p-2) mod 16 and the
// address pattern alternates per frame; output column (p-3) mod 16, valid from period 19.
// Also checks that each frame's 16 IRM transfer slots visit every location exactly once.
module tb_dct_control;
  logic clk = 0, rst_n = 0;
  logic dp_first, dp_last, dp_src_col, srb1_load, srb1_shift, srb2_shift, srb3_load, srb3_shift,
        srb4_shift, irm_we, irm_colmajor, in_load, out_valid;
  logic [3:0] word_idx, in_row, in_col, out_col, out_k;
  logic [7:0] irm_addr;
  int checks = 0, failures = 0;

  dct_control dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int exp, int t);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("t=%0d %s: got %0d expected %0d", t, what, got, exp);
    end
  endtask

  initial begin
    int cyc, half, per, wr, colmajor;
    int visits [256];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 32 * 16 * 3; t++) begin
      cyc = t % 16; half = (t / 16) % 2; per = t / 32;
      wr = (per - 2 + 64) % 32;
      colmajor = wr / 16;
      #1;
      expect_eq("dp_first", dp_first, cyc == 0, t);
      expect_eq("dp_last", dp_last, cyc == 15, t);
      expect_eq("dp_src_col", dp_src_col, half, t);
      expect_eq("srb1_load", srb1_load, half, t);
      expect_eq("srb1_shift", srb1_shift, !half, t);
      expect_eq("srb2_shift", srb2_shift, half, t);
      expect_eq("srb3_load", srb3_load, !half, t);
      expect_eq("srb3_shift", srb3_shift, half, t);
      expect_eq("srb4_shift", srb4_shift, !half, t);
      expect_eq("word_idx", word_idx, cyc, t);
      expect_eq("irm_we", irm_we, !half, t);
      expect_eq("in_load", in_load, half, t);
      expect_eq("in_row", in_row, per % 16, t);
      expect_eq("in_col", in_col, cyc, t);
      expect_eq("out_valid", out_valid, half && per >= 19, t);
      if (out_valid) begin
        expect_eq("out_col", out_col, (per - 3) % 16, t);
        expect_eq("out_k", out_k, cyc, t);
      end
      if (!half) begin
        expect_eq("irm_colmajor", irm_colmajor, colmajor, t);
        expect_eq("irm_addr", irm_addr, colmajor ? cyc * 16 + wr % 16 : (wr % 16) * 16 + cyc, t);
        visits[irm_addr]++;
      end
      if (!half && cyc == 15 && wr % 16 == 15) begin
        for (int a = 0; a < 256; a++) begin
          if (per >= 17) expect_eq("visits", visits[a], 1, t);
          visits[a] = 0;
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
