// srb: shift register bank of NW words of W bits, built from srb_cell.
//
// Two kinds of transfer:
//  - word-parallel: with load_en high, load_data is written into word load_idx (one word per
//    cycle); par_out shows all words at once;
//  - bit-serial: with shift_en high, every word shifts one place towards its LSB at the same
//    time; ser_out[w] is the current LSB of word w, and ser_in[w] enters at its MSB.
// An input bank (parallel load, serial out) and an output bank (serial in, parallel out) are
// the same module used from different sides. load_en takes priority over shift_en for the
// addressed word.
//
// The sizes (16 words of 16 bits) and the composition by abutment of one basic cell follow the
// document; the per-word load address is this design's choice.
module srb
  import dct_pkg::*;
#(
  parameter int unsigned NW = NPTS,
  parameter int unsigned W  = DATA_W
) (
  input  logic                  clk,
  input  logic                  load_en,
  input  logic [$clog2(NW)-1:0] load_idx,
  input  logic [W-1:0]          load_data,
  input  logic                  shift_en,
  input  logic [NW-1:0]         ser_in,
  output logic [NW-1:0]         ser_out,
  output logic [W-1:0]          par_out [NW]
);
  for (genvar w = 0; w < NW; w++) begin : g_word
    logic [W-1:0] q;   // serial chain
    logic [W-1:0] pq;  // parallel taps
    logic         ld;

    assign ld = load_en && (load_idx == ($clog2(NW))'(w));

    for (genvar b = 0; b < W; b++) begin : g_bit
      srb_cell u_cell (
        .clk   (clk),
        .shift (shift_en),
        .load  (ld),
        .s_in  ((b == W - 1) ? ser_in[w] : q[(b == W - 1) ? b : b + 1]),
        .p_in  (load_data[b]),
        .s_out (q[b]),
        .p_out (pq[b])
      );
    end

    assign ser_out[w] = q[0];
    assign par_out[w] = pq;
  end

endmodule
