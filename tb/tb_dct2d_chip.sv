// tb_dct2d_chip: end-to-end test of the 2-D DCT core at its default sizes.
//
// Streams NFRAMES 16 x 16 blocks back to back (random 8-bit pixels, one block of extreme
// values, one block with a single impulse), and compares every output word with a bit-exact
// word-level model (rows, then columns, each pass rounded like the hardware) and, loosely,
// with the unquantised 2-D MSDCT. Also checks the latency of the first output (608 cycles after
// reset, 608 cycles after the first input word), the output rate (16 words per 32 cycles) and that both IRM address patterns, the
// read-and-overwrite transfer, row and column passes, and pre-subtraction results of both signs
// were exercised.
module tb_dct2d_chip;
  import tb_dct_ref_pkg::*;

  localparam int NFRAMES = 6;

  logic        clk = 0, rst_n = 0;
  logic [15:0] din;
  logic        in_load, out_valid;
  logic [3:0]  in_row, in_col, out_col, out_k;
  logic [15:0] dout;

  dct2d_chip dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  logic signed [15:0] frames [NFRAMES+2][NP][NP];   // [frame][row][col]
  logic signed [15:0] expect2d [NFRAMES][NP][NP];   // [frame][k][c]
  real                realmax;

  // Mechanism counters.
  int n_rows = 0, n_cols = 0, n_irm_rowmajor = 0, n_irm_colmajor = 0, n_overwrite = 0;

  initial begin
    for (int f = 0; f < NFRAMES + 2; f++)
      for (int r = 0; r < NP; r++)
        for (int c = 0; c < NP; c++) begin
          if (f == 1)      frames[f][r][c] = ((r + c) % 2 == 0) ? 16'sd255 : -16'sd255;
          else if (f == 2) frames[f][r][c] = (r == 3 && c == 5) ? 16'sd200 : 16'sd0;
          else             frames[f][r][c] = 16'($urandom_range(255));
        end
    for (int f = 0; f < NFRAMES; f++) begin
      vec_t v, t;
      logic signed [15:0] mid [NP][NP];
      for (int r = 0; r < NP; r++) begin
        for (int c = 0; c < NP; c++) v[c] = frames[f][r][c];
        t = ref_1d(v);
        for (int c = 0; c < NP; c++) mid[r][c] = t[c];
      end
      for (int c = 0; c < NP; c++) begin
        for (int r = 0; r < NP; r++) v[r] = mid[r][c];
        t = ref_1d(v);
        for (int k = 0; k < NP; k++) expect2d[f][k][c] = t[k];
      end
    end
  end

  // Stimulus: blocks back to back, one word whenever in_load is high.
  int in_frame = 0;
  always_comb din = frames[in_frame < NFRAMES + 2 ? in_frame : 0][in_row][in_col];
  always @(posedge clk) if (rst_n && in_load && in_row == 15 && in_col == 15) in_frame <= in_frame + 1;

  // Output checking.
  int out_frame = 0, out_words = 0, first_out = -1, first_in = -1, words_in_period = 0;
  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (in_load && first_in < 0) first_in = cycle;
    if (out_valid) begin
      if (first_out < 0) first_out = cycle;
      if (out_frame < NFRAMES) begin
        checks++;
        if ($signed(dout) !== expect2d[out_frame][out_k][out_col]) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH frame %0d k %0d c %0d: got %0d expected %0d", out_frame, out_k,
                     out_col, $signed(dout), expect2d[out_frame][out_k][out_col]);
        end
        // Plausibility against the unquantised transform (real-valued 2-D MSDCT).
        begin
          real acc, tol;
          acc = 0.0;
          for (int r = 0; r < NP; r++)
            for (int c = 0; c < NP; c++)
              acc += ((r == 0 || r == NP - 1) ? 0.5 : 1.0) * ((c == 0 || c == NP - 1) ? 0.5 : 1.0)
                     * real'(frames[out_frame][r][c])
                     * $cos(PI * real'(r * out_k) / 15.0) * $cos(PI * real'(c * out_col) / 15.0);
          acc = acc * 2.0 / 15.0;
          // Bound on the effect of 1/128 coefficient steps and two roundings.
          tol = 8.0 + 0.012 * ((acc < 0.0) ? -acc : acc);
          for (int r = 0; r < NP; r++)
            for (int c = 0; c < NP; c++)
              tol += 0.0008 * ((frames[out_frame][r][c] < 0) ? -real'(frames[out_frame][r][c])
                                                             : real'(frames[out_frame][r][c]));
          checks++;
          if ((acc - real'($signed(dout)) > tol) || (real'($signed(dout)) - acc > tol)) begin
            failures++;
            $display("FAR FROM MSDCT frame %0d k %0d c %0d: got %0d real %f", out_frame, out_k,
                     out_col, $signed(dout), acc);
          end
        end
      end
      out_words++;
      words_in_period++;
      if (out_k == 15 && out_col == 15) out_frame++;
    end
    if (dut.u_ctrl.dp_first && !dut.u_ctrl.dp_src_col) begin
      if (words_in_period != 0 && words_in_period != 16) begin
        failures++;
        $display("RATE: %0d words in one period", words_in_period);
      end
      checks += (words_in_period == 16);
      words_in_period = 0;
    end
    // mechanism counting
    if (dut.u_ctrl.dp_last) begin
      if (dut.u_ctrl.dp_src_col) n_cols++; else n_rows++;
    end
    if (dut.u_ctrl.irm_we) begin
      n_overwrite++;
      if (dut.u_ctrl.irm_colmajor) n_irm_colmajor++; else n_irm_rowmajor++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (out_frame == NFRAMES);
    repeat (4) @(posedge clk);
    // Latency of the first valid word.
    checks++;
    if (first_out != 624 || first_out - first_in != 608) begin
      failures++;
      $display("LATENCY: first output in cycle %0d, first input in cycle %0d", first_out, first_in);
    end
    $display("rows %0d cols %0d irm-rowmajor %0d irm-colmajor %0d overwrites %0d",
             n_rows, n_cols, n_irm_rowmajor, n_irm_colmajor, n_overwrite);
    checks++; if (n_rows < 16 * NFRAMES) begin failures++; $display("too few row passes"); end
    checks++; if (n_cols < 16 * NFRAMES) begin failures++; $display("too few column passes"); end
    checks++; if (n_irm_rowmajor == 0) begin failures++; $display("row-major IRM pattern never used"); end
    checks++; if (n_irm_colmajor == 0) begin failures++; $display("column-major IRM pattern never used"); end
    checks++; if (n_overwrite == 0) begin failures++; $display("IRM overwrite never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
