// dct_coef_rom: the coefficient buffer of a processing element.
//
// Holds the T x T DCT-II matrix A (see dct_pkg::dct_coef) as signed
// fixed-point words and returns A[k][j] combinationally, so the multiplier
// sees the coefficient in the same cycle as its operand. The contents are
// fixed at elaboration from T and COEF_FRAC; a second-stage PE ties j to its
// own row index, and synthesis then keeps only that column. That the buffer
// holds the matrix A follows the architecture; a read-only table instead of a
// loadable buffer is this design's choice.
module dct_coef_rom
  import dct_pkg::*;
#(
  parameter int T      = 4,
  parameter int CW     = COEF_W,
  parameter int CFRAC  = COEF_FRAC,
  parameter int IW     = (T <= 2) ? 1 : $clog2(T)
) (
  input  logic [IW-1:0]        k,   // output frequency index (row of A)
  input  logic [IW-1:0]        j,   // input sample index (column of A)
  output logic signed [CW-1:0] coef
);
  logic signed [CW-1:0] table_q [T][T];

  for (genvar gk = 0; gk < T; gk++) begin : g_k
    for (genvar gj = 0; gj < T; gj++) begin : g_j
      localparam int C = dct_coef(T, gk, gj, CFRAC);
      assign table_q[gk][gj] = CW'(C);
    end
  end

  assign coef = table_q[k][j];
endmodule
