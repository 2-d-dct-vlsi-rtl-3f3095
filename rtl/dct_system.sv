// dct_system: top level, a cascade of CHIPS identical 2-D DCT chips.
//
// With the default CHIPS = 1 it is the single M x M (4 x 4) 2-D DCT chip.
// With CHIPS > 1 it computes a T x T transform, T = M * CHIPS (four 4 x 4
// chips give the 16 x 16 DCT), at the same pixel rate: every chip listens to
// the shared input bus and keeps the M rows of each T-row strip it owns
// (chip c owns rows c*M .. c*M+M-1), and the q state variables of the column
// transform flow from the last second-stage PE of one chip into the first of
// the next. Each chip then works on T-point coefficients; in this design that
// is fixed by the T parameter at elaboration.
//
// Interface: pixel stream in_valid/in_data/in_ready, N pixels per image row,
// rows in progressive-scan order, image height a multiple of T. Output stream
// out_valid/out_data/out_ready of signed integer DCT coefficients, per T x T
// block column by column (V[0][l] .. V[T-1][l] for l = 0..T-1), blocks left
// to right, strips top to bottom. A pixel is accepted only when every chip can
// take it, so the chips see the same transfers. strip_done pulses when the
// last pixel of a strip is accepted. One pixel per cycle is sustained when
// the output is not held back.
module dct_system
  import dct_pkg::*;
#(
  parameter int N     = 1024,  // pixels per image row
  parameter int M     = 4,     // PEs per stage on one chip
  parameter int CHIPS = 1      // cascaded chips
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [PIX_W-1:0]        in_data,
  output logic                    in_ready,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data,
  input  logic                    out_ready,
  output logic                    strip_done
);
  localparam int T = M * CHIPS;

  logic [CHIPS-1:0]        chip_ready, chip_strip_done;
  logic [CHIPS:0]          q_valid, q_ready;
  logic signed [ACC_W-1:0] q_data [CHIPS+1];

  assign in_ready   = &chip_ready;
  assign q_valid[0] = 1'b0;
  assign q_data[0]  = '0;

  for (genvar c = 0; c < CHIPS; c++) begin : g_chip
    dct_chip #(
      .N(N), .M(M), .T(T), .ROW_BASE(c * M),
      .CHAIN_HEAD(c == 0), .CHAIN_TAIL(c == CHIPS - 1)
    ) u_chip (
      .clk, .rst_n,
      .in_valid  (in_valid && in_ready),
      .in_data   (in_data),
      .in_ready  (chip_ready[c]),
      .q_in_valid(q_valid[c]),
      .q_in_data (q_data[c]),
      .q_in_ready(q_ready[c]),
      .out_valid (q_valid[c+1]),
      .out_data  (q_data[c+1]),
      .out_ready (q_ready[c+1]),
      .strip_done(chip_strip_done[c])
    );
  end

  assign out_valid       = q_valid[CHIPS];
  assign out_data        = q_data[CHIPS][OUT_W-1:0];
  assign q_ready[CHIPS]  = out_ready;
  assign strip_done      = chip_strip_done[0];
endmodule
