// dct_control: control unit of the 2-D DCT core.
//
// Time is divided into slots of DW = 16 cycles, grouped in pairs (periods of 32 cycles). The 1-D
// processor (1DDP) transforms a row in the first slot of every period (half = 0) and a column in
// the second (half = 1), so it never idles, and every bank alternates between a 16-cycle
// transfer and a 16-cycle shift:
//
//   slot         half 0                          half 1
//   SRB1         shifts row into 1DDP            loads next row from din (word in_col)
//   SRB2         writes last row result to IRM   receives row result from 1DDP
//   SRB3         loads column from IRM           shifts column into 1DDP
//   SRB4         receives column result          drives dout (word out_k)
//   IRM          read + overwrite, one word/cyc  idle
//
// In half 0 the IRM is walked along one column of the previous frame; each location is read
// into SRB3 and, in the same cycle, overwritten with the word of the current frame's newest row
// from SRB2. Frame n therefore lands transposed with respect to frame n-1, and the address
// pattern alternates between row-major and column-major from frame to frame. The bit
// `irm_colmajor` tells which pattern is in use (1: the row being written goes down a column of
// the array).
//
// Row r of a frame is loaded in period p (p mod 16 = r), shifted in period p+1, its result
// reaches SRB2 in p+1, and it is written to the IRM in p+2 while column r of the previous frame
// is read. That column is transformed in p+2 and appears on dout in half 1 of p+3. So output
// column c of frame n comes out in period 16(n+1) + c + 3; out_valid rises once the first frame
// loaded after reset reaches the output (after 19 periods).
//
// The four-step schedules for rows and columns and their interleaving come from the document;
// the exact counters and the alternating address pattern are this design's realisation.
module dct_control
  import dct_pkg::*;
#(
  parameter int unsigned N  = NPTS,    // points per transform = words per bank
  parameter int unsigned DW = DATA_W   // cycles per slot = bits per word
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // 1DDP
  output logic                   dp_first,     // bit 0 is being shifted
  output logic                   dp_last,      // sign bit is being shifted
  output logic                   dp_src_col,   // 1DDP input from SRB3 (else SRB1)
  // banks
  output logic                   srb1_load,
  output logic                   srb1_shift,
  output logic                   srb2_shift,
  output logic                   srb3_load,
  output logic                   srb3_shift,
  output logic                   srb4_shift,
  output logic [$clog2(N)-1:0]   word_idx,     // word addressed in SRB1/2/3/4 this cycle
  // IRM
  output logic                   irm_we,
  output logic [2*$clog2(N)-1:0] irm_addr,
  output logic                   irm_colmajor,
  // external stream
  output logic                   in_load,      // din is taken at this clock edge
  output logic [$clog2(N)-1:0]   in_row,
  output logic [$clog2(N)-1:0]   in_col,
  output logic                   out_valid,    // dout holds a result
  output logic [$clog2(N)-1:0]   out_col,      // horizontal frequency
  output logic [$clog2(N)-1:0]   out_k         // vertical frequency
);
  localparam int unsigned LN     = $clog2(N);
  localparam int unsigned LD     = $clog2(DW);
  localparam int unsigned WARMUP = N + 3;      // periods before the first valid output

  if (N != DW || (1 << LN) != N) begin : g_bad
    $error("dct_control: needs N == DW, a power of two");
  end

  logic [LD-1:0] cyc_q;     // cycle within slot
  logic          half_q;    // 0: row slot, 1: column slot
  logic [LN:0]   per_q;     // period modulo 2N: {frame parity, row loaded}
  logic [5:0]    warm_q;    // periods since reset, saturating

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_q  <= '0;
      half_q <= 1'b0;
      per_q  <= '0;
      warm_q <= '0;
    end else begin
      cyc_q <= cyc_q + 1'b1;
      if (cyc_q == LD'(DW - 1)) begin
        half_q <= ~half_q;
        if (half_q) begin
          per_q <= per_q + 1'b1;
          if (warm_q != 6'(WARMUP)) warm_q <= warm_q + 1'b1;
        end
      end
    end
  end

  // Row being written to the IRM in this period (loaded two periods ago) and its frame parity.
  logic [LN:0] wr_q;
  assign wr_q = per_q - (LN+1)'(2);

  assign dp_first   = (cyc_q == '0);
  assign dp_last    = (cyc_q == LD'(DW - 1));
  assign dp_src_col = half_q;

  assign srb1_shift = ~half_q;
  assign srb1_load  = half_q;
  assign srb2_shift = half_q;
  assign srb3_load  = ~half_q;
  assign srb3_shift = half_q;
  assign srb4_shift = ~half_q;
  assign word_idx   = LN'(cyc_q);

  assign irm_we       = ~half_q;
  assign irm_colmajor = wr_q[LN];
  assign irm_addr     = irm_colmajor ? {LN'(cyc_q), wr_q[LN-1:0]} : {wr_q[LN-1:0], LN'(cyc_q)};

  assign in_load   = half_q;
  assign in_row    = per_q[LN-1:0];
  assign in_col    = LN'(cyc_q);
  assign out_valid = half_q && (warm_q == 6'(WARMUP));
  assign out_col   = per_q[LN-1:0] - LN'(3);
  assign out_k     = LN'(cyc_q);

  // Schedule rules: a bank never transfers words and shifts bits in the same cycle, the 1DDP
  // always has exactly one input bank shifting, and the IRM is only written while SRB3 loads.
  a_srb1_excl: assert property (@(posedge clk) disable iff (!rst_n) !(srb1_load && srb1_shift));
  a_srb3_excl: assert property (@(posedge clk) disable iff (!rst_n) !(srb3_load && srb3_shift));
  a_one_src:   assert property (@(posedge clk) disable iff (!rst_n) srb1_shift != srb3_shift);
  a_out_banks: assert property (@(posedge clk) disable iff (!rst_n) srb2_shift != srb4_shift);
  a_irm_we:    assert property (@(posedge clk) disable iff (!rst_n) irm_we == srb3_load);

endmodule
