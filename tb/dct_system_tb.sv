// dct_system_tb: end-to-end test of the cascaded 2-D DCT.
//
// Two systems run side by side on reduced row lengths: a single chip (4 x 4
// DCT, 48-pixel rows) and four cascaded chips (16 x 16 DCT, 64-pixel rows).
// dct_stream_bench feeds each an image, first at one pixel per cycle (no
// stall allowed: real-time rate), then with random input gaps and output
// back-pressure, and checks every coefficient against the exact fixed-point
// model and the real DCT. Mechanisms counted and required at least once:
// input stall from back-pressure, output held by the consumer, strip
// completion, and q state variables crossing from one chip to the next.
module dct_system_tb;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;

  // ---------------- 4 x 4, one chip
  logic a_iv, a_ir, a_ov, a_or, a_sd, a_done;
  logic [7:0] a_id;
  logic signed [15:0] a_od;
  int a_chk, a_fail, a_rts, a_rnds, a_oh, a_strips;

  dct_system #(.N(48), .M(4), .CHIPS(1)) u_dut_4 (
    .clk, .rst_n, .in_valid(a_iv), .in_data(a_id), .in_ready(a_ir),
    .out_valid(a_ov), .out_data(a_od), .out_ready(a_or), .strip_done(a_sd));

  dct_stream_bench #(.N(48), .T(4), .STRIPS(6), .RT_STRIPS(3), .SEED(11)) u_bench_4 (
    .clk, .rst_n, .in_valid(a_iv), .in_data(a_id), .in_ready(a_ir),
    .out_valid(a_ov), .out_data(a_od), .out_ready(a_or), .strip_done(a_sd),
    .done(a_done), .checks(a_chk), .failures(a_fail), .rt_stalls(a_rts),
    .rnd_stalls(a_rnds), .strips_seen(a_strips));

  // ---------------- 16 x 16, four chips
  logic b_iv, b_ir, b_ov, b_or, b_sd, b_done;
  logic [7:0] b_id;
  logic signed [15:0] b_od;
  int b_chk, b_fail, b_rts, b_rnds, b_oh, b_strips;
  int chain_xfers;

  dct_system #(.N(64), .M(4), .CHIPS(4)) u_dut_16 (
    .clk, .rst_n, .in_valid(b_iv), .in_data(b_id), .in_ready(b_ir),
    .out_valid(b_ov), .out_data(b_od), .out_ready(b_or), .strip_done(b_sd));

  dct_stream_bench #(.N(64), .T(16), .STRIPS(3), .RT_STRIPS(1), .SEED(23)) u_bench_16 (
    .clk, .rst_n, .in_valid(b_iv), .in_data(b_id), .in_ready(b_ir),
    .out_valid(b_ov), .out_data(b_od), .out_ready(b_or), .strip_done(b_sd),
    .done(b_done), .checks(b_chk), .failures(b_fail), .rt_stalls(b_rts),
    .rnd_stalls(b_rnds), .strips_seen(b_strips));

  // a result waiting in the last PE while the consumer holds it off
  initial begin chain_xfers = 0; a_oh = 0; b_oh = 0; end
  always @(posedge clk) begin
    if (rst_n && u_dut_16.q_valid[1] && u_dut_16.q_ready[1]) chain_xfers++;
    if (rst_n && !a_or && u_dut_4.g_chip[0].u_chip.g_col[3].u_pe_col.y_avail) a_oh++;
    if (rst_n && !b_or && u_dut_16.g_chip[3].u_chip.g_col[3].u_pe_col.y_avail) b_oh++;
  end

  task automatic need(string what, int count);
    checks++;
    $display("%-34s %0d", what, count);
    if (count == 0) failures++;
  endtask

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (a_done && b_done);
    repeat (5) @(posedge clk);
    checks   += a_chk + b_chk;
    failures += a_fail + b_fail;
    $display("4x4:   outputs checked %0d, failures %0d", a_chk, a_fail);
    $display("16x16: outputs checked %0d, failures %0d", b_chk, b_fail);
    need("4x4 input stalls (back-pressure)", a_rnds);
    need("16x16 input stalls (back-pressure)", b_rnds);
    need("4x4 output held by consumer", a_oh);
    need("16x16 output held by consumer", b_oh);
    need("4x4 strips completed", a_strips);
    need("16x16 strips completed", b_strips);
    need("q transfers chip 0 -> chip 1", chain_xfers);
    checks++;
    if (chain_xfers != 3 * 64 * 16) begin    // each q of each strip crosses once
      failures++;
      $display("expected %0d q transfers", 3 * 64 * 16);
    end
    checks++;
    if (a_rts != 0 || b_rts != 0) begin
      failures++;
      $display("stall during real-time phase: %0d %0d", a_rts, b_rts);
    end
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
