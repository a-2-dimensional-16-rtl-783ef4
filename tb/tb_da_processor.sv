// tb_da_processor: feeds DA processors 0 (even row) and 7 (odd row) with random 16-bit
// pre-added words, bit-serially through the ROM address, and checks each serial result
// against floor((sum_n a_kn u_n + 64) / 2^7), i.e. rounded, with coefficients recomputed from the MSDCT definition.
// Also checks the result word starts one cycle after the sign-bit cycle (16-cycle period).
module tb_da_processor;
  import tb_dct_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] addr;
  logic last, out0, out7;
  int checks = 0, failures = 0;

  da_processor #(.K(0)) u0 (.clk, .rst_n, .addr, .last, .out(out0));
  da_processor #(.K(7)) u7 (.clk, .rst_n, .addr, .last, .out(out7));

  always #5 clk = ~clk;

  logic [15:0] e0_q [$], e7_q [$];

  initial begin
    logic signed [15:0] u [8];
    longint a0, a7;
    addr = 0; last = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      a0 = 64; a7 = 64;
      for (int n = 0; n < 8; n++) begin
        u[n] = 16'($urandom);
        if (w == 0) u[n] = 16'sh7fff;
        if (w == 1) u[n] = -16'sh8000;
        a0 += longint'(ref_coef(0, n)) * longint'(u[n]);
        a7 += longint'(ref_coef(7, n)) * longint'(u[n]);
      end
      e0_q.push_back(16'(a0 >>> 7));
      e7_q.push_back(16'(a7 >>> 7));
      for (int j = 0; j < 16; j++) begin
        for (int n = 0; n < 8; n++) addr[n] = u[n][j];
        last = (j == 15);
        @(negedge clk);
      end
    end
    addr = 0; last = 0;
    repeat (20) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r0, r7, e0, e7;
    forever begin
      @(posedge clk);
      if (last && rst_n) begin
        for (int j = 0; j < 16; j++) begin
          @(negedge clk);
          r0[j] = out0; r7[j] = out7;
        end
        e0 = e0_q.pop_front(); e7 = e7_q.pop_front();
        checks += 2;
        if (r0 !== e0) begin failures++; $display("K0 got %h expected %h", r0, e0); end
        if (r7 !== e7) begin failures++; $display("K7 got %h expected %h", r7, e7); end
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
