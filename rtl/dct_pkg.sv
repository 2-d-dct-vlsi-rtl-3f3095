// dct_pkg: shared constants, types and the coefficient generator of the
// state-space 2-D DCT.
//
// The transform is V = A U A^T with the orthonormal DCT-II matrix
//   A[k][j] = s(k) * cos((2j+1) k pi / (2T)),  s(0) = sqrt(1/T), s(k>0) = sqrt(2/T)
// where T is the transform size (T x T blocks). Coefficients are held as
// signed fixed-point numbers with COEF_FRAC fractional bits; the table is
// computed at elaboration time by dct_coef() so no constant table is stored
// in the source. The word widths are this design's own choice: 8-bit pixels,
// 14-bit coefficients, 16-bit first-stage results with 4 fractional bits,
// 32-bit accumulators and 16-bit integer DCT outputs.
package dct_pkg;

  // Fixed-point formats (defaults of every module)
  localparam int PIX_W     = 8;   // unsigned input pixel
  localparam int COEF_W    = 14;  // signed coefficient
  localparam int COEF_FRAC = 12;  // fractional bits of a coefficient
  localparam int Y_W       = 16;  // signed first-stage result y
  localparam int Y_FRAC    = 4;   // fractional bits kept in y
  localparam int ACC_W     = 32;  // r and q state variables
  localparam int OUT_W     = 16;  // signed integer DCT output g

  // Role a processing element plays in the array.
  typedef enum logic [1:0] {
    ROLE_ROW       = 2'd0,  // first stage: pixels in, y out (R-FIFO used)
    ROLE_COL_HEAD  = 2'd1,  // second stage, first in the q chain (no q input)
    ROLE_COL_MID   = 2'd2,  // second stage: q in, q out
    ROLE_COL_TAIL  = 2'd3   // second stage, last in the chain: q in, g out
  } pe_role_e;

  // Fixed-point DCT-II coefficient A[k][j] of a T-point transform.
  function automatic int dct_coef(int t, int k, int j, int frac);
    real s, v;
    s = (k == 0) ? $sqrt(1.0 / t) : $sqrt(2.0 / t);
    v = s * $cos((2 * j + 1) * k * 3.14159265358979323846 / (2.0 * t)) * (2.0 ** frac);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int clog2_min1(int n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
