// dct1d_processor: the 1-D DCT processor (1DDP), a full N-point MSDCT in one pass.
//
// The N input words enter bit-parallel across words and bit-serial within a word: in each of
// DW cycles, x_bits[n] is bit j of input x(n), LSB first; `first` marks bit 0 and `last` the sign
// bit. N/2 pre-adders form x(n) + x(N-1-n) and N/2 pre-subtractors x(n) - x(N-1-n). The sums
// address the ROMs of the DA processors of the even outputs, the differences those of the odd
// outputs, so all N outputs are computed concurrently. Output k leaves on y_bits[k], LSB first,
// during the DW cycles after `last` (see csa_alu), overlapping the next transform's input.
//
// Latency: DW cycles in, DW cycles out; one transform every DW cycles.
// The structure (mirrored pre-add/pre-subtract, N processors split into even and odd groups)
// follows the document.
module dct1d_processor
  import dct_pkg::*;
#(
  parameter int unsigned N  = NPTS,
  parameter int unsigned W  = COEF_W,
  parameter int unsigned DW = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x_bits,
  input  logic         first,
  input  logic         last,
  output logic [N-1:0] y_bits
);
  logic [N/2-1:0] sum_bits, dif_bits;

  for (genvar n = 0; n < N / 2; n++) begin : g_pre
    serial_preadd #(.SUB(1'b0)) u_add (
      .clk (clk), .rst_n (rst_n), .a (x_bits[n]), .b (x_bits[N-1-n]),
      .first (first), .d (sum_bits[n])
    );
    serial_preadd #(.SUB(1'b1)) u_sub (
      .clk (clk), .rst_n (rst_n), .a (x_bits[n]), .b (x_bits[N-1-n]),
      .first (first), .d (dif_bits[n])
    );
  end

  for (genvar k = 0; k < N; k++) begin : g_dap
    da_processor #(.N(N), .K(k), .W(W), .DW(DW)) u_dap (
      .clk   (clk),
      .rst_n (rst_n),
      .addr  ((k % 2 == 0) ? sum_bits : dif_bits),
      .last  (last),
      .out   (y_bits[k])
    );
  end

endmodule
