// dct_tb_pkg: reference models shared by the testbenches.
//
// ref_coef() recomputes the fixed-point DCT-II matrix from its definition
//   A[k][j] = s(k) cos((2j+1) k pi / 2T), s(0) = sqrt(1/T), s(k>0) = sqrt(2/T),
// scaled by 2^12 and rounded to nearest. ref_image_dct() turns an image held
// row-major in a queue into the exact output stream of the design:
//   y[r][c0+k] = round(sum_j A[k][j] x[r][c0+j] / 2^8)    (first stage)
//   g[k][l]    = round(sum_r A[k][r] y[r][c0+l] / 2^16)   (second stage)
// in the order strip, block, column l, row k; and the real-valued DCT of the
// same blocks, for a tolerance check against the exact transform.
package dct_tb_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic int ref_coef(int t, int k, int j);
    real s, v;
    s = (k == 0) ? $sqrt(1.0 / t) : $sqrt(2.0 / t);
    v = s * $cos((2 * j + 1) * k * PI / (2.0 * t)) * 4096.0;
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic real real_coef(int t, int k, int j);
    real s;
    s = (k == 0) ? $sqrt(1.0 / t) : $sqrt(2.0 / t);
    return s * $cos((2 * j + 1) * k * PI / (2.0 * t));
  endfunction

  // arithmetic shift right with round-half-up
  function automatic longint rshift_rnd(longint v, int sh);
    return (v + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction

  function automatic void ref_image_dct(int t, int n, int rows, ref int img[$],
                                        ref int exp_g[$], ref real exp_r[$]);
    longint y [];
    real    yr [];
    y  = new[rows * n];
    yr = new[rows * n];
    for (int r = 0; r < rows; r++)
      for (int c0 = 0; c0 < n; c0 += t)
        for (int k = 0; k < t; k++) begin
          longint s = 0;
          real    sr = 0.0;
          for (int j = 0; j < t; j++) begin
            s  += longint'(ref_coef(t, k, j)) * img[r * n + c0 + j];
            sr += real_coef(t, k, j) * img[r * n + c0 + j];
          end
          y[r * n + c0 + k]  = rshift_rnd(s, 8);
          yr[r * n + c0 + k] = sr;
        end
    for (int s0 = 0; s0 < rows; s0 += t)
      for (int c0 = 0; c0 < n; c0 += t)
        for (int l = 0; l < t; l++)
          for (int k = 0; k < t; k++) begin
            longint s = 0;
            real    sr = 0.0;
            for (int r = 0; r < t; r++) begin
              s  += longint'(ref_coef(t, k, r)) * y[(s0 + r) * n + c0 + l];
              sr += real_coef(t, k, r) * yr[(s0 + r) * n + c0 + l];
            end
            exp_g.push_back(int'(rshift_rnd(s, 16)));
            exp_r.push_back(sr);
          end
  endfunction
endpackage
