// tb_dct1d_processor: sends 16-point vectors (random 8-bit, random 12-bit signed, constant,
// alternating) through the 1DDP back to back and checks all 16 serial outputs of each against
// the word-level reference 1-D transform; one transform per 16 cycles.
module tb_dct1d_processor;
  import tb_dct_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] x_bits, y_bits;
  logic first, last;
  int checks = 0, failures = 0;

  dct1d_processor dut (.clk, .rst_n, .x_bits, .first, .last, .y_bits);

  always #5 clk = ~clk;

  localparam int NV = 150;
  logic signed [15:0] exp_a [NV][16];

  initial begin
    vec_t x;
    x_bits = 0; first = 0; last = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < NV; w++) begin
      for (int n = 0; n < 16; n++) begin
        case (w % 4)
          0: x[n] = 16'($urandom_range(255));
          1: x[n] = 16'($signed(12'($urandom)));
          2: x[n] = 16'sd255;
          default: x[n] = (n % 2 == 0) ? 16'sd255 : -16'sd255;
        endcase
      end
      begin
        vec_t e;
        e = ref_1d(x);
        for (int k = 0; k < 16; k++) exp_a[w][k] = e[k];
      end
      for (int j = 0; j < 16; j++) begin
        for (int n = 0; n < 16; n++) x_bits[n] = x[n][j];
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
    logic [15:0] r [16];
    int nr = 0;
    forever begin
      @(posedge clk);
      if (last && rst_n) begin
        for (int j = 0; j < 16; j++) begin
          @(negedge clk);
          for (int k = 0; k < 16; k++) r[k][j] = y_bits[k];
        end
        for (int k = 0; k < 16; k++) begin
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
