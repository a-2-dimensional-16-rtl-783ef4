// dct_pkg: sizes and coefficient arithmetic shared by the 2-D MSDCT datapath.
//
// The transform is the Modified Symmetric DCT
//   X(k) = sqrt(2/(N-1)) * sum_n c_n x(n) cos(n k pi/(N-1)),  c_0 = c_(N-1) = 1/2, else 1,
// which is its own inverse, so one datapath serves both directions.
// Row k of its matrix is symmetric (k even) or antisymmetric (k odd) about the centre, so
// X(k) = sum_{n<N/2} a_kn * (x(n) +/- x(N-1-n)) and each distributed-arithmetic (DA) processor
// needs a ROM of only 2^(N/2) words.
//
// Transform size (16), data word (16 bits) and ROM word (10 bits) follow the chip
// specification. The fixed-point scale of the ROM (COEF_FRAC fraction bits) is this design's
// choice: 7 is the most that keeps every ROM word of the 16-point transform inside 10 signed bits.
// The ROM is not stored as a table of numbers: coef() rounds
//   a_kn = 2^COEF_FRAC * sqrt(2/(N-1)) * c_n * cos(n k pi/(N-1))
// to an integer, and rom_word() sums the coefficients selected by the address bits, so the
// ROM holds exactly sum_n a_kn * addr[n] for every address.
package dct_pkg;

  localparam int unsigned NPTS      = 16;  // points per 1-D transform
  localparam int unsigned DATA_W    = 16;  // data word length (input, intermediate, output)
  localparam int unsigned COEF_W    = 10;  // ROM word length = width of the DA ALU
  localparam int unsigned COEF_FRAC = 7;   // fraction bits of a ROM word

  // Integer coefficient a_kn (n < N/2) of the half-size inner product of output k.
  function automatic int coef(int unsigned n_pts, int unsigned k, int unsigned n,
                              int unsigned frac);
    real c, v;
    c = (n == 0) ? 0.5 : 1.0;
    v = (2.0 ** frac) * $sqrt(2.0 / (n_pts - 1)) * c
        * $cos(3.14159265358979323846 * n * k / (n_pts - 1));
    return $rtoi($floor(v + 0.5));
  endfunction

  // ROM word of DA processor k at address addr: bit n of addr selects x(n) +/- x(N-1-n).
  function automatic int rom_word(int unsigned n_pts, int unsigned k, int unsigned addr,
                                  int unsigned frac);
    int s;
    s = 0;
    for (int unsigned n = 0; n < n_pts / 2; n++)
      if (addr[n]) s += coef(n_pts, k, n, frac);
    return s;
  endfunction

endpackage
