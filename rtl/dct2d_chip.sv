// dct2d_chip: core of a 2-D 16 x 16 point Modified Symmetric DCT (MSDCT) processor for video.
//
// A 16 x 16 block is transformed as 16 row transforms followed by 16 column transforms, all on
// one 1-D processor (1DDP) of 16 distributed-arithmetic processors that works bit-serially:
// one complete 16-point transform every 16 cycles. Four shift register banks convert between
// word-serial I/O and the bit-serial 1DDP: SRB1 takes rows from din, SRB2 collects row results,
// the Intermediate Result Memory (IRM) stores them and performs the transposition, SRB3 feeds
// columns back, SRB4 collects column results for dout. Rows of one block and columns of the
// previous block alternate every 16 cycles, so all parts are busy all the time and two blocks
// are in flight (see dct_control for the schedule).
//
// Interface (one clock, asynchronous active-low reset):
//  - din is taken when in_load is high, 16 words per 32 cycles: word in_col of row in_row.
//    Blocks follow each other without gaps; the first row after reset is row 0 of block 0.
//  - dout is valid when out_valid is high, 16 words per 32 cycles: coefficient
//    (vertical frequency out_k, horizontal frequency out_col) of the block, one column of the
//    result per period. The first valid word appears in cycle 624 after reset (cycle 0 is the
//    first after reset), 608 cycles after row 0, word 0 of block 0 was taken in cycle 16.
//  - Throughput: one pixel every 2 cycles (a 512 x 512 image at 32 frames/s needs 16.8 MHz).
//  - Scaling: dout = X(k, c) of the 2-D MSDCT at the scale of the input, each pass rounded
//    to the nearest integer and kept to 16 bits; inputs must leave
//    guard bits (8-bit pixels fit comfortably), as there is no overflow detection.
// The architecture, sizes and schedule follow the document; the port protocol, scaling and
// IRM addressing are this design's choices.
module dct2d_chip
  import dct_pkg::*;
#(
  parameter int unsigned N  = NPTS,
  parameter int unsigned W  = COEF_W,
  parameter int unsigned DW = DATA_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DW-1:0]        din,
  output logic                 in_load,
  output logic [$clog2(N)-1:0] in_row,
  output logic [$clog2(N)-1:0] in_col,
  output logic [DW-1:0]        dout,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_col,
  output logic [$clog2(N)-1:0] out_k
);
  localparam int unsigned LN = $clog2(N);

  logic                dp_first, dp_last, dp_src_col;
  logic                srb1_load, srb1_shift, srb2_shift, srb3_load, srb3_shift, srb4_shift;
  logic [LN-1:0]       word_idx;
  logic                irm_we, irm_colmajor;
  logic [2*LN-1:0]     irm_addr;
  logic [DW-1:0]       irm_rdata;

  logic [N-1:0]        srb1_ser, srb3_ser, x_bits, y_bits;
  logic [DW-1:0]       srb1_par [N];
  logic [DW-1:0]       srb2_par [N];
  logic [DW-1:0]       srb3_par [N];
  logic [DW-1:0]       srb4_par [N];
  logic [N-1:0]        srb2_ser_unused, srb4_ser_unused;

  dct_control #(.N(N), .DW(DW)) u_ctrl (
    .clk, .rst_n,
    .dp_first, .dp_last, .dp_src_col,
    .srb1_load, .srb1_shift, .srb2_shift, .srb3_load, .srb3_shift, .srb4_shift,
    .word_idx,
    .irm_we, .irm_addr, .irm_colmajor,
    .in_load, .in_row, .in_col,
    .out_valid, .out_col, .out_k
  );

  // Input banks: SRB1 from outside, SRB3 from the IRM.
  srb #(.NW(N), .W(DW)) u_srb1 (
    .clk, .load_en (srb1_load), .load_idx (word_idx), .load_data (din),
    .shift_en (srb1_shift), .ser_in ('0), .ser_out (srb1_ser), .par_out (srb1_par)
  );

  srb #(.NW(N), .W(DW)) u_srb3 (
    .clk, .load_en (srb3_load), .load_idx (word_idx), .load_data (irm_rdata),
    .shift_en (srb3_shift), .ser_in ('0), .ser_out (srb3_ser), .par_out (srb3_par)
  );

  // 1-D processor, fed from SRB1 in row slots and SRB3 in column slots.
  assign x_bits = dp_src_col ? srb3_ser : srb1_ser;

  dct1d_processor #(.N(N), .W(W), .DW(DW)) u_1ddp (
    .clk, .rst_n, .x_bits, .first (dp_first), .last (dp_last), .y_bits
  );

  // Output banks: row results to SRB2, column results to SRB4.
  srb #(.NW(N), .W(DW)) u_srb2 (
    .clk, .load_en (1'b0), .load_idx ('0), .load_data ('0),
    .shift_en (srb2_shift), .ser_in (y_bits), .ser_out (srb2_ser_unused), .par_out (srb2_par)
  );

  srb #(.NW(N), .W(DW)) u_srb4 (
    .clk, .load_en (1'b0), .load_idx ('0), .load_data ('0),
    .shift_en (srb4_shift), .ser_in (y_bits), .ser_out (srb4_ser_unused), .par_out (srb4_par)
  );

  irm #(.DEPTH(N * N), .W(DW)) u_irm (
    .clk, .addr (irm_addr), .we (irm_we), .wdata (srb2_par[word_idx]), .rdata (irm_rdata)
  );

  assign dout = srb4_par[word_idx];

endmodule
