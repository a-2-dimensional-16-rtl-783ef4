// srb_cell: one bit of a shift register bank.
//
// The stored bit is taken either from the serial input (the neighbouring cell, `shift`) or from
// the parallel input (`load`, which wins); otherwise it holds. It is visible both as the serial
// output towards the next cell and as the parallel output. Banks of any size are built by
// chaining cells.
//
// The cell's ports (s_in, p_in, s_out, p_out) and its serial-or-parallel behaviour follow the
// document's basic cell, which is dynamic logic clocked by three phases; here it is a single
// edge-triggered flip-flop with an input selector, clocked by the one system clock. It has no
// reset: every bank is written before it is read.
module srb_cell (
  input  logic clk,
  input  logic shift,  // take s_in
  input  logic load,   // take p_in
  input  logic s_in,
  input  logic p_in,
  output logic s_out,
  output logic p_out
);
  logic q;

  always_ff @(posedge clk) begin
    if (load)       q <= p_in;
    else if (shift) q <= s_in;
  end

  assign s_out = q;
  assign p_out = q;

endmodule
