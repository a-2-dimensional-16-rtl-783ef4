// serial_preadd: bit-serial pre-adder (SUB = 0) or pre-subtractor (SUB = 1).
//
// Forms d = a + b or d = a - b of two DW-bit two's complement words that arrive LSB first,
// one bit per cycle; `first` marks bit 0. The sum bit is combinational, so it reaches the ROM
// address of the DA processors in the same cycle as its input bits; a single flip-flop carries
// between bits. Subtraction adds the inverted b with a carry-in of one on bit 0. The result is
// kept to DW bits: the data are expected to leave guard bits in the 16-bit word (8-bit pixels in
// a 16-bit register), so the wrap-around never occurs in use.
//
// The pre-addition and pre-subtraction of mirrored inputs come from the document; the bit-serial
// adder with a carry flip-flop is this design's choice for it.
module serial_preadd #(
  parameter bit SUB = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  input  logic first,
  output logic d
);
  logic bx, cin, c_q;

  assign bx  = b ^ SUB;
  assign cin = first ? SUB : c_q;
  assign d   = a ^ bx ^ cin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_q <= 1'b0;
    else        c_q <= (a & bx) | (a & cin) | (bx & cin);
  end

endmodule
