// da_processor: one distributed-arithmetic (DA) processor, a coefficient ROM feeding a
// carry-save accumulator.
//
// It computes one output of the N-point transform, X(K) = sum_{n<N/2} a_Kn * u_n, where u_n are
// the pre-added (K even) or pre-subtracted (K odd) input pairs. The u_n arrive bit-serially,
// LSB first, as the N/2-bit ROM address `addr`, one bit-slice per cycle for DW cycles; `last`
// marks the slice holding the sign bits. The result leaves serially on `out`, LSB first, in
// the DW cycles after `last`, while the next inner product is already being accumulated.
// `out` carries bits [COEF_FRAC+DW-1 : COEF_FRAC] of the exact inner product of the integer ROM
// coefficients and the inputs plus 2^(COEF_FRAC-1), i.e. the transform output at the scale of
// the input data, rounded to nearest.
//
// Partitioning into ROM and ALU follows the document; the output scaling is this design's choice.
module da_processor
  import dct_pkg::*;
#(
  parameter int unsigned N  = NPTS,
  parameter int unsigned K  = 0,
  parameter int unsigned W  = COEF_W,
  parameter int unsigned DW = DATA_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N/2-1:0] addr,
  input  logic           last,
  output logic           out
);
  logic [W-1:0] f;

  dap_rom #(.N(N), .K(K), .W(W), .FRAC(COEF_FRAC)) u_rom (
    .addr (addr),
    .data (f)
  );

  csa_alu #(.W(W), .DW(DW), .OUT_LSB(COEF_FRAC)) u_alu (
    .clk   (clk),
    .rst_n (rst_n),
    .f     (f),
    .sub   (last),
    .out   (out)
  );

endmodule
