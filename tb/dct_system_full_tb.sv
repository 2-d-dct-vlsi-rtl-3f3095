// dct_system_full_tb: the top level at its default parameters (one chip,
// 4 x 4 DCT, 1024-pixel rows) transforming two full strips of a 1024-wide
// image: the first at one pixel per cycle, which must pass without a single
// input stall, the second under random input gaps and output back-pressure.
// Every coefficient is compared with the exact fixed-point model and with
// the real DCT.
module dct_system_full_tb;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic iv, ir, ov, ordy, sd, done;
  logic [7:0] id;
  logic signed [15:0] od;
  int chk, fail, rts, rnds, strips;

  dct_system u_dut (
    .clk, .rst_n, .in_valid(iv), .in_data(id), .in_ready(ir),
    .out_valid(ov), .out_data(od), .out_ready(ordy), .strip_done(sd));

  dct_stream_bench #(.N(1024), .T(4), .STRIPS(2), .RT_STRIPS(1), .SEED(5)) u_bench (
    .clk, .rst_n, .in_valid(iv), .in_data(id), .in_ready(ir),
    .out_valid(ov), .out_data(od), .out_ready(ordy), .strip_done(sd),
    .done, .checks(chk), .failures(fail), .rt_stalls(rts),
    .rnd_stalls(rnds), .strips_seen(strips));

  int checks, failures;
  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    repeat (5) @(posedge clk);
    $display("outputs checked %0d, real-time stalls %0d, back-pressure stalls %0d, strips %0d",
             chk, rts, rnds, strips);
    checks   = chk + 1;
    failures = fail + (rnds == 0 ? 1 : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
