// tb_dct2d_image: real-time video workload, a whole 512 x 512 image (1024 blocks of 16 x 16).
//
// Chip A (forward) receives a synthetic 8-bit image block by block, in raster order, and every
// coefficient it produces is compared with the bit-exact word-level reference. Its output is
// the input of chip B: the MSDCT is its own inverse, so B reconstructs the image, which must
// match the original pixels within the rounding of four passes and 10-bit
// coefficients (measured: at most about 30 levels at block corners, about 4 on average; with
// 7 fraction bits in the coefficients this is the precision limit of the inverse). Timing checks: each block takes exactly 512 cycles (2 cycles per pixel), so a
// 512 x 512 image takes 524288 cycles, 1/32 s at 16.78 MHz.
module tb_dct2d_image;
  import tb_dct_ref_pkg::*;

  localparam int IMG    = 512;
  localparam int BPL    = IMG / NP;        // blocks per line
  localparam int NBLK   = BPL * BPL;
  localparam int  TOL      = 32;           // largest reconstruction error, pixel units
  localparam real MEAN_TOL = 5.0;          // largest mean absolute reconstruction error

  logic clk = 0, rst_a = 0, rst_b = 0;
  always #5 clk = ~clk;

  logic [15:0] din_a, dout_a, din_b, dout_b;
  logic        in_load_a, out_valid_a, in_load_b, out_valid_b;
  logic [3:0]  in_row_a, in_col_a, out_col_a, out_k_a;
  logic [3:0]  in_row_b, in_col_b, out_col_b, out_k_b;

  dct2d_chip u_a (.clk, .rst_n(rst_a), .din(din_a), .in_load(in_load_a), .in_row(in_row_a),
                  .in_col(in_col_a), .dout(dout_a), .out_valid(out_valid_a), .out_col(out_col_a),
                  .out_k(out_k_a));
  dct2d_chip u_b (.clk, .rst_n(rst_b), .din(din_b), .in_load(in_load_b), .in_row(in_row_b),
                  .in_col(in_col_b), .dout(dout_b), .out_valid(out_valid_b), .out_col(out_col_b),
                  .out_k(out_k_b));

  int checks = 0, failures = 0;
  logic [7:0]         img [IMG][IMG];
  logic signed [15:0] coefs [NBLK][NP][NP];   // chip A output, [block][k][c]
  logic signed [15:0] expect_c [NP][NP];
  int blk_in_a = 0, blk_out_a = 0, blk_in_b = 0, blk_out_b = 0;
  int cycle = 0, last_start_a = -1, max_err = 0;
  longint sum_err = 0;

  function automatic logic signed [15:0] pixel(int b, int r, int c);
    return 16'(img[(b / BPL) * NP + r][(b % BPL) * NP + c]);
  endfunction

  // Reference 2-D transform of block b of the image.
  task automatic reference(int b);
    vec_t v, t;
    logic signed [15:0] mid [NP][NP];
    for (int r = 0; r < NP; r++) begin
      for (int c = 0; c < NP; c++) v[c] = pixel(b, r, c);
      t = ref_1d(v);
      for (int c = 0; c < NP; c++) mid[r][c] = t[c];
    end
    for (int c = 0; c < NP; c++) begin
      for (int r = 0; r < NP; r++) v[r] = mid[r][c];
      t = ref_1d(v);
      for (int k = 0; k < NP; k++) expect_c[k][c] = t[k];
    end
  endtask

  initial
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++)
        img[y][x] = 8'((x / 2 + y / 3 + ((x * y) % 37) + $urandom_range(15)) % 256);

  // Chip A input and output.
  always_comb din_a = (blk_in_a < NBLK) ? pixel(blk_in_a, in_row_a, in_col_a) : 16'd0;
  always_comb din_b = (blk_in_b < NBLK) ? coefs[blk_in_b][in_row_b][in_col_b] : 16'd0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_a && in_load_a && in_row_a == 0 && in_col_a == 0) begin
      if (last_start_a >= 0 && blk_in_a < NBLK) begin
        checks++;
        if (cycle - last_start_a != 512) begin
          failures++;
          $display("block period %0d cycles", cycle - last_start_a);
        end
      end
      last_start_a <= cycle;
    end
    if (rst_a && in_load_a && in_row_a == 15 && in_col_a == 15) blk_in_a <= blk_in_a + 1;
    if (rst_a && out_valid_a && blk_out_a < NBLK) begin
      if (out_k_a == 0 && out_col_a == 0) reference(blk_out_a);
      coefs[blk_out_a][out_k_a][out_col_a] = dout_a;
      checks++;
      if ($signed(dout_a) !== expect_c[out_k_a][out_col_a]) begin
        failures++;
        if (failures < 10) $display("A block %0d k %0d c %0d: %0d vs %0d", blk_out_a, out_k_a,
                                    out_col_a, $signed(dout_a), expect_c[out_k_a][out_col_a]);
      end
      if (out_k_a == 15 && out_col_a == 15) blk_out_a <= blk_out_a + 1;
    end
    // Chip B: inverse transform of A's output.
    if (rst_b && in_load_b && in_row_b == 15 && in_col_b == 15) blk_in_b <= blk_in_b + 1;
    if (rst_b && out_valid_b && blk_out_b < NBLK) begin
      int e;
      e = $signed(dout_b) - pixel(blk_out_b, out_k_b, out_col_b);
      if (e < 0) e = -e;
      if (e > max_err) max_err = e;
      sum_err += e;
      checks++;
      if (e > TOL) begin
        failures++;
        if (failures < 10) $display("B block %0d (%0d,%0d): %0d vs pixel %0d", blk_out_b, out_k_b,
                                    out_col_b, $signed(dout_b), pixel(blk_out_b, out_k_b, out_col_b));
      end
      if (out_k_b == 15 && out_col_b == 15) blk_out_b <= blk_out_b + 1;
    end
  end

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_a = 1;
    t0 = cycle;
    wait (blk_out_a == 1);
    @(negedge clk);
    rst_b = 1;
    wait (blk_in_a == NBLK);
    checks++;
    $display("image of %0d blocks taken in %0d cycles", NBLK, cycle - t0);
    if (cycle - t0 > NBLK * 512 + 16) begin
      failures++;
      $display("image input too slow");
    end
    wait (blk_out_b == NBLK);
    $display("largest reconstruction error %0d, mean %f", max_err, real'(sum_err) / real'(IMG * IMG));
    checks++;
    if (real'(sum_err) / real'(IMG * IMG) > MEAN_TOL) begin
      failures++;
      $display("mean reconstruction error too large");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * 512 * 2 + 5000) @(posedge clk);
    failures++;
    $display("WATCHDOG blocks A in %0d out %0d, B in %0d out %0d", blk_in_a, blk_out_a, blk_in_b, blk_out_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
