// tb_csa_alu: drives the carry-save accumulator with random 10-bit ROM words, 16 per inner
// product, back to back, and checks each 16-bit serial result against
// (sum_{j<15} F_j 2^j - F_15 2^15 + 64) >>> 7 (rounded), received in the 16 cycles that follow the sign-bit
// cycle while the next product accumulates.
module tb_csa_alu;
  logic clk = 0, rst_n = 0;
  logic [9:0] f;
  logic sub, out;
  int checks = 0, failures = 0;

  csa_alu dut (.clk, .rst_n, .f, .sub, .out);

  always #5 clk = ~clk;

  localparam int NW = 300;
  longint expect_q [$];

  initial begin
    longint acc;
    logic [9:0] fj;
    // the rounding constant half an output LSB is part of the expected result
    f = 0; sub = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < NW; w++) begin
      acc = 64;
      for (int j = 0; j < 16; j++) begin
        fj = 10'($urandom);
        if (w == 0) fj = 10'h200;           // most negative word everywhere
        if (w == 1) fj = 10'h1ff;           // most positive word everywhere
        f = fj; sub = (j == 15);
        if (j < 15) acc += longint'($signed(fj)) <<< j;
        else        acc -= longint'($signed(fj)) <<< j;
        @(negedge clk);
      end
      expect_q.push_back(acc);
    end
    f = 0; sub = 0;
    repeat (20) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Receiver: 16 bits after every sub.
  initial begin
    logic [15:0] r;
    longint e;
    forever begin
      @(posedge clk);
      if (sub && rst_n) begin
        for (int j = 0; j < 16; j++) begin
          @(negedge clk);
          r[j] = out;
        end
        e = expect_q.pop_front();
        checks++;
        if (r !== 16'(e >>> 7)) begin
          failures++;
          if (failures < 10) $display("got %h expected %h (full %0d)", r, 16'(e >>> 7), e);
        end
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
