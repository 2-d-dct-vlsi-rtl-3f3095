// dct_chip_tb: the chip on its own and as a cascade slice.
//
// (a) One chip as a complete 4 x 4 DCT on 16-pixel rows.
// (b) Two chips wired by hand into an 8 x 8 DCT on 32-pixel rows: the first
//     (rows 0..3, chain head) passes its q state variables through out_* into
//     q_in_* of the second (rows 4..7, chain tail), which produces the output.
// dct_stream_bench drives both at one pixel per cycle first (no stall
// allowed), then with random gaps and back-pressure, and checks every
// coefficient exactly against the fixed-point model and within +-2 against
// the real DCT.
module dct_chip_tb;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks, failures;

  // ---------------- (a) 4 x 4
  logic a_iv, a_ir, a_ov, a_or, a_sd, a_done;
  logic [7:0] a_id;
  logic signed [31:0] a_od;
  int a_chk, a_fail, a_rts, a_rnds, a_strips;
  logic a_qr;

  dct_chip #(.N(16), .M(4)) u_chip4 (
    .clk, .rst_n, .in_valid(a_iv), .in_data(a_id), .in_ready(a_ir),
    .q_in_valid(1'b0), .q_in_data('0), .q_in_ready(a_qr),
    .out_valid(a_ov), .out_data(a_od), .out_ready(a_or), .strip_done(a_sd));

  dct_stream_bench #(.N(16), .T(4), .STRIPS(8), .RT_STRIPS(4), .SEED(3)) u_bench4 (
    .clk, .rst_n, .in_valid(a_iv), .in_data(a_id), .in_ready(a_ir),
    .out_valid(a_ov), .out_data(a_od[15:0]), .out_ready(a_or), .strip_done(a_sd),
    .done(a_done), .checks(a_chk), .failures(a_fail), .rt_stalls(a_rts),
    .rnd_stalls(a_rnds), .strips_seen(a_strips));

  // ---------------- (b) 8 x 8 from two chips
  logic b_iv, b_ir, b_ov, b_or, b_sd, b_done;
  logic [7:0] b_id;
  logic signed [31:0] b_od, m_qd;
  logic m_qv, m_qr, b_ir0, b_ir1, b_sd1, b_qr0;
  int b_chk, b_fail, b_rts, b_rnds, b_strips, links;

  assign b_ir = b_ir0 && b_ir1;

  dct_chip #(.N(32), .M(4), .T(8), .ROW_BASE(0), .CHAIN_HEAD(1'b1), .CHAIN_TAIL(1'b0)) u_chip_lo (
    .clk, .rst_n, .in_valid(b_iv && b_ir), .in_data(b_id), .in_ready(b_ir0),
    .q_in_valid(1'b0), .q_in_data('0), .q_in_ready(b_qr0),
    .out_valid(m_qv), .out_data(m_qd), .out_ready(m_qr), .strip_done(b_sd));

  dct_chip #(.N(32), .M(4), .T(8), .ROW_BASE(4), .CHAIN_HEAD(1'b0), .CHAIN_TAIL(1'b1)) u_chip_hi (
    .clk, .rst_n, .in_valid(b_iv && b_ir), .in_data(b_id), .in_ready(b_ir1),
    .q_in_valid(m_qv), .q_in_data(m_qd), .q_in_ready(m_qr),
    .out_valid(b_ov), .out_data(b_od), .out_ready(b_or), .strip_done(b_sd1));

  dct_stream_bench #(.N(32), .T(8), .STRIPS(4), .RT_STRIPS(2), .SEED(9)) u_bench8 (
    .clk, .rst_n, .in_valid(b_iv), .in_data(b_id), .in_ready(b_ir),
    .out_valid(b_ov), .out_data(b_od[15:0]), .out_ready(b_or), .strip_done(b_sd),
    .done(b_done), .checks(b_chk), .failures(b_fail), .rt_stalls(b_rts),
    .rnd_stalls(b_rnds), .strips_seen(b_strips));

  initial links = 0;
  always @(posedge clk) if (rst_n && m_qv && m_qr) links++;

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (a_done && b_done);
    repeat (5) @(posedge clk);
    $display("4x4: %0d checks, %0d failures, %0d stalls; 8x8: %0d checks, %0d failures, %0d stalls, %0d q links",
             a_chk, a_fail, a_rnds, b_chk, b_fail, b_rnds, links);
    checks   = a_chk + b_chk + 3;
    failures = a_fail + b_fail + (a_rnds == 0) + (b_rnds == 0)
             + (links != 4 * 32 * 8 ? 1 : 0);   // every q of every strip crosses once
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
