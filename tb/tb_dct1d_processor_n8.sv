// tb_dct1d_processor_n8: the 1-D processor configured as the 8-point example transform
// (8 DA processors, 16-word ROMs addressed by 4 pre-added or pre-subtracted bits). Random
// vectors are sent back to back and every output is compared with the exact integer inner
// product of the 8-point MSDCT coefficients (recomputed here), rounded by 2^7.
module tb_dct1d_processor_n8;
  localparam int NP = 8;
  localparam int NV = 200;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic [NP-1:0] x_bits, y_bits;
  logic first, last;
  int checks = 0, failures = 0;

  dct1d_processor #(.N(NP)) dut (.clk, .rst_n, .x_bits, .first, .last, .y_bits);

  always #5 clk = ~clk;

  function automatic int coef8(int k, int n);
    real v;
    v = 128.0 * $sqrt(2.0 / 7.0) * ((n == 0) ? 0.5 : 1.0) * $cos(PI * real'(n * k) / 7.0);
    return $rtoi($floor(v + 0.5));
  endfunction

  logic signed [15:0] exp_a [NV][NP];

  initial begin
    logic signed [15:0] x [NP];
    logic signed [15:0] u;
    longint acc;
    x_bits = 0; first = 0; last = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < NV; w++) begin
      for (int n = 0; n < NP; n++) x[n] = 16'($signed(12'($urandom)));
      for (int k = 0; k < NP; k++) begin
        acc = 64;
        for (int n = 0; n < NP / 2; n++) begin
          u = (k % 2 == 0) ? x[n] + x[NP-1-n] : x[n] - x[NP-1-n];
          acc += longint'(coef8(k, n)) * longint'(u);
        end
        exp_a[w][k] = 16'(acc >>> 7);
      end
      for (int j = 0; j < 16; j++) begin
        for (int n = 0; n < NP; n++) x_bits[n] = x[n][j];
        first = (j == 0); last = (j == 15);
        @(negedge clk);
      end
    end
    x_bits = 0; first = 0; last = 0;
    repeat (20) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r [NP];
    int nr = 0;
    forever begin
      @(posedge clk);
      if (last && rst_n) begin
        for (int j = 0; j < 16; j++) begin
          @(negedge clk);
          for (int k = 0; k < NP; k++) r[k][j] = y_bits[k];
        end
        for (int k = 0; k < NP; k++) begin
          checks++;
          if (r[k] !== exp_a[nr][k]) begin
            failures++;
            if (failures < 10) $display("X(%0d) got %0d expected %0d", k, $signed(r[k]), exp_a[nr][k]);
          end
        end
        nr++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
