// tb_dct_ref_pkg: reference arithmetic for the testbenches of the 2-D MSDCT datapath.
//
// Works on whole words, not bits: the coefficients are recomputed from the MSDCT definition,
// a 1-D transform is the exact integer inner product of those coefficients with the
// mirrored sums/differences, divided by 2^7 with rounding to nearest (ties upwards) and wrapped to
// 16 bits. msdct_real() gives the unquantised transform for plausibility checks.
package tb_dct_ref_pkg;

  localparam int NP   = 16;
  localparam int FRAC = 7;
  localparam real PI  = 3.14159265358979323846;

  typedef logic signed [15:0] vec_t [NP];

  function automatic int ref_coef(int k, int n);
    real v;
    v = 128.0 * $sqrt(2.0 / 15.0) * ((n == 0) ? 0.5 : 1.0) * $cos(PI * real'(n * k) / 15.0);
    return $rtoi($floor(v + 0.5));
  endfunction

  // Exact inner product for output k, before scaling.
  function automatic longint ref_dot(vec_t x, int k);
    longint acc;
    logic signed [15:0] u;
    acc = 0;
    for (int n = 0; n < NP / 2; n++) begin
      if (k % 2 == 0) u = x[n] + x[NP-1-n];
      else            u = x[n] - x[NP-1-n];
      acc += longint'(ref_coef(k, n)) * longint'(u);
    end
    return acc;
  endfunction

  function automatic vec_t ref_1d(vec_t x);
    vec_t y;
    for (int k = 0; k < NP; k++) y[k] = 16'((ref_dot(x, k) + (64'sd1 <<< (FRAC - 1))) >>> FRAC);
    return y;
  endfunction

  function automatic real msdct_real(vec_t x, int k);
    real acc;
    acc = 0.0;
    for (int n = 0; n < NP; n++)
      acc += ((n == 0 || n == NP - 1) ? 0.5 : 1.0) * real'(x[n]) * $cos(PI * real'(n * k) / 15.0);
    return $sqrt(2.0 / 15.0) * acc;
  endfunction

endpackage
