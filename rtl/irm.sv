// irm: Intermediate Result Memory, a DEPTH x W single-port RAM.
//
// One address serves both directions in the same cycle: rdata shows the word stored at addr
// (combinational read) and, when we is high, wdata replaces that word at the clock edge. So a
// read-then-overwrite of one location takes one cycle, which is how the controller streams out a
// column of the previous frame while the new frame's row takes its place.
//
// Size (16 x 16 words of 16 bits) and the single access port follow the document, where the part
// comes from a standard static RAM compiler; the read timing is this design's choice.
// Contents are not reset.
module irm
  import dct_pkg::*;
#(
  parameter int unsigned DEPTH = NPTS * NPTS,
  parameter int unsigned W     = DATA_W
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     we,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
