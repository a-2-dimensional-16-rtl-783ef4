// tb_irm: fills the 256-word memory, then walks it with read-and-overwrite cycles in column
// order (each cycle must return the old word and store the new one), and checks the result in
// row order; random idle cycles with the write enable low must not change anything.
module tb_irm;
  logic clk = 0;
  logic [7:0] addr;
  logic we;
  logic [15:0] wdata, rdata;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  irm dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); we = 1; wdata = 16'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    for (int pass = 0; pass < 4; pass++) begin
      for (int i = 0; i < 256; i++) begin
        addr = (pass % 2 == 0) ? {i[3:0], i[7:4]} : 8'(i);
        we = 1'($urandom); wdata = 16'($urandom);
        #1;
        checks++;
        if (rdata !== model[addr]) begin failures++; $display("addr %0d got %h expected %h", addr, rdata, model[addr]); end
        if (we) model[addr] = wdata;
        @(negedge clk);
      end
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
