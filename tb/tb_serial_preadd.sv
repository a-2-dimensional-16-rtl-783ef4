// tb_serial_preadd: checks the bit-serial pre-adder and pre-subtractor on random 16-bit words
// (including extreme values) sent back to back, LSB first, against 16-bit word arithmetic.
module tb_serial_preadd;
  logic clk = 0, rst_n = 0;
  logic a, b, first, d_add, d_sub;
  int checks = 0, failures = 0;

  serial_preadd #(.SUB(1'b0)) u_add (.clk, .rst_n, .a, .b, .first, .d(d_add));
  serial_preadd #(.SUB(1'b1)) u_sub (.clk, .rst_n, .a, .b, .first, .d(d_sub));

  always #5 clk = ~clk;

  initial begin
    logic [15:0] x, y, s, t;
    a = 0; b = 0; first = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      x = 16'($urandom); y = 16'($urandom);
      if (w == 0) begin x = 16'h8000; y = 16'h7fff; end
      if (w == 1) begin x = 16'h0000; y = 16'hffff; end
      for (int j = 0; j < 16; j++) begin
        a = x[j]; b = y[j]; first = (j == 0);
        #1;
        s[j] = d_add; t[j] = d_sub;
        @(negedge clk);
      end
      checks += 2;
      if (s !== 16'(x + y)) begin failures++; $display("add %h+%h got %h", x, y, s); end
      if (t !== 16'(x - y)) begin failures++; $display("sub %h-%h got %h", x, y, t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
