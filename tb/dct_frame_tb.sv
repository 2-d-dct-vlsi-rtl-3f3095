// dct_frame_tb: a whole 1024 x 1024 frame, streamed at one pixel per cycle,
// through the default single-chip 4 x 4 system and, side by side, through
// four cascaded chips computing the 16 x 16 DCT. Both must take every one of
// the 1,048,576 pixels without a stall (real-time operation) and produce
// every coefficient exactly as the fixed-point model predicts. Prints the
// number of cycles from the first pixel to the last coefficient.
module dct_frame_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 1024, H = 1024;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic a_iv, a_ir, a_ov, a_or, a_sd, a_done;
  logic [7:0] a_id;
  logic signed [15:0] a_od;
  int a_chk, a_fail, a_rts, a_rnds, a_strips;

  dct_system u_dut_4 (
    .clk, .rst_n, .in_valid(a_iv), .in_data(a_id), .in_ready(a_ir),
    .out_valid(a_ov), .out_data(a_od), .out_ready(a_or), .strip_done(a_sd));

  dct_stream_bench #(.N(W), .T(4), .STRIPS(H / 4), .RT_STRIPS(H / 4), .SEED(101)) u_bench_4 (
    .clk, .rst_n, .in_valid(a_iv), .in_data(a_id), .in_ready(a_ir),
    .out_valid(a_ov), .out_data(a_od), .out_ready(a_or), .strip_done(a_sd),
    .done(a_done), .checks(a_chk), .failures(a_fail), .rt_stalls(a_rts),
    .rnd_stalls(a_rnds), .strips_seen(a_strips));

  logic b_iv, b_ir, b_ov, b_or, b_sd, b_done;
  logic [7:0] b_id;
  logic signed [15:0] b_od;
  int b_chk, b_fail, b_rts, b_rnds, b_strips;

  dct_system #(.CHIPS(4)) u_dut_16 (
    .clk, .rst_n, .in_valid(b_iv), .in_data(b_id), .in_ready(b_ir),
    .out_valid(b_ov), .out_data(b_od), .out_ready(b_or), .strip_done(b_sd));

  dct_stream_bench #(.N(W), .T(16), .STRIPS(H / 16), .RT_STRIPS(H / 16), .SEED(202)) u_bench_16 (
    .clk, .rst_n, .in_valid(b_iv), .in_data(b_id), .in_ready(b_ir),
    .out_valid(b_ov), .out_data(b_od), .out_ready(b_or), .strip_done(b_sd),
    .done(b_done), .checks(b_chk), .failures(b_fail), .rt_stalls(b_rts),
    .rnd_stalls(b_rnds), .strips_seen(b_strips));

  int checks, failures, cycle, a_end, b_end;
  initial begin cycle = 0; a_end = 0; b_end = 0; end
  always @(posedge clk) begin
    cycle++;
    if (a_done && a_end == 0) a_end = cycle;
    if (b_done && b_end == 0) b_end = cycle;
  end

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (a_done && b_done);
    repeat (5) @(posedge clk);
    $display("4x4:   %0d coefficients, %0d failures, %0d stalls, last coefficient at cycle %0d",
             a_chk, a_fail, a_rts, a_end);
    $display("16x16: %0d coefficients, %0d failures, %0d stalls, last coefficient at cycle %0d",
             b_chk, b_fail, b_rts, b_end);
    checks   = a_chk + b_chk;
    failures = a_fail + b_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (W * H + 200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
