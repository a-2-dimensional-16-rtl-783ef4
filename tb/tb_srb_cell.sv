// tb_srb_cell: checks the basic cell in a 3-cell chain: parallel load (which wins over shift),
// serial shift, hold, and that both outputs show the stored bit.
module tb_srb_cell;
  logic clk = 0;
  logic shift, load, s_in;
  logic [2:0] p_in, s_out, p_out;
  logic [2:0] model;
  int checks = 0, failures = 0;

  srb_cell c0 (.clk, .shift, .load, .s_in(s_out[1]), .p_in(p_in[0]), .s_out(s_out[0]), .p_out(p_out[0]));
  srb_cell c1 (.clk, .shift, .load, .s_in(s_out[2]), .p_in(p_in[1]), .s_out(s_out[1]), .p_out(p_out[1]));
  srb_cell c2 (.clk, .shift, .load, .s_in(s_in),     .p_in(p_in[2]), .s_out(s_out[2]), .p_out(p_out[2]));

  always #5 clk = ~clk;

  initial begin
    load = 1; shift = 1; p_in = 3'b101; s_in = 0;
    @(negedge clk);
    model = 3'b101;
    for (int i = 0; i < 400; i++) begin
      checks += 2;
      if (s_out !== model) begin failures++; $display("s_out %b expected %b", s_out, model); end
      if (p_out !== model) begin failures++; $display("p_out %b expected %b", p_out, model); end
      load = 1'($urandom); shift = 1'($urandom); p_in = 3'($urandom); s_in = 1'($urandom);
      if (load)       model = p_in;
      else if (shift) model = {s_in, model[2:1]};
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
