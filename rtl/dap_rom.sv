// dap_rom: coefficient look-up table of one distributed-arithmetic processor.
//
// Holds the 2^(N/2) partial sums F(addr) = sum_n a_kn * addr[n] of DA processor K, as two's
// complement words of COEF_W bits with COEF_FRAC fraction bits (see dct_pkg). The address is
// the current bit-slice of the N/2 pre-added or pre-subtracted inputs. The read is
// combinational: the ALU consumes the word in the same clock cycle that the address bits are
// shifted in.
//
// The ROM size (2^(N/2) words for N = 16, i.e. 256) and the 10-bit word follow the document. In
// silicon two processors share one row decoder; here each ROM is a self-contained array, and the
// contents are computed at elaboration time from the transform definition.
module dap_rom
  import dct_pkg::*;
#(
  parameter int unsigned N    = NPTS,
  parameter int unsigned K    = 0,        // index of the transform output this ROM serves
  parameter int unsigned W    = COEF_W,
  parameter int unsigned FRAC = COEF_FRAC
) (
  input  logic [N/2-1:0] addr,
  output logic [W-1:0]   data
);
  localparam int unsigned DEPTH = 1 << (N / 2);

  typedef logic [W-1:0] rom_t [DEPTH];

  function automatic rom_t build();
    rom_t r;
    for (int unsigned a = 0; a < DEPTH; a++) r[a] = W'(rom_word(N, K, a, FRAC));
    return r;
  endfunction

  // Constant contents, computed at elaboration.
  localparam rom_t ROM = build();

  assign data = ROM[addr];

endmodule
