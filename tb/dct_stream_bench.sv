// dct_stream_bench: stimulus and checker for a 2-D DCT pixel-stream design.
//
// Generates an image of STRIPS*T rows by N random pixels (the first block of
// every strip is forced to full white, the second to a 0/255 checkerboard,
// to reach the ends of the number range), feeds it row by row and compares
// every output coefficient, in order, with the exact fixed-point model of
// dct_tb_pkg and, within +-2, with the real-valued DCT.
// The first RT_STRIPS strips are sent at one pixel per cycle with the output
// always ready: the design must then accept every pixel without stalling
// (rate check: P pixels in P cycles). The remaining strips use random input
// gaps and random output back-pressure, which must stall the input at least
// once. Results are reported through the checks/failures outputs.
module dct_stream_bench
  import dct_tb_pkg::*;
#(
  parameter int N         = 16,
  parameter int T         = 4,
  parameter int STRIPS    = 2,
  parameter int RT_STRIPS = 1,
  parameter int SEED      = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               in_valid,
  output logic [7:0]         in_data,
  input  logic               in_ready,
  input  logic               out_valid,
  input  logic signed [15:0] out_data,
  output logic               out_ready,
  input  logic               strip_done,
  output logic               done,
  output int                 checks,
  output int                 failures,
  output int                 rt_stalls,
  output int                 rnd_stalls,
  output int                 strips_seen
);
  localparam int ROWS = STRIPS * T;
  localparam int P    = ROWS * N;
  localparam int P_RT = RT_STRIPS * T * N;

  int  img[$];
  int  exp_g[$];
  real exp_r[$];
  int  sent, recv, bad_exact, bad_real;
  int  rt_first, rt_last, cycle;
  bit  rt_phase;

  initial begin
    void'($urandom(SEED));
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < N; c++) begin
        int v = int'($urandom_range(255));
        if (c < T) v = 255;
        else if (c < 2 * T) v = (((r + c) & 1) != 0) ? 255 : 0;
        img.push_back(v);
      end
    ref_image_dct(T, N, ROWS, img, exp_g, exp_r);
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    in_valid  = 1'b0;
    in_data   = '0;
    out_ready = 1'b1;
    sent      = 0;
    rt_stalls = 0;
    rnd_stalls = 0;
    rt_phase  = 1'b1;
    rt_first  = 0;
    rt_last   = 0;
    @(posedge rst_n);
    @(negedge clk);
    while (sent < P) begin
      rt_phase  = (sent < P_RT);
      in_valid  = rt_phase ? 1'b1 : ($urandom_range(9) != 0);
      in_data   = 8'(img[sent]);
      out_ready = rt_phase ? 1'b1 : ($urandom_range(1) != 0);
      @(posedge clk);
      if (in_valid && !in_ready) begin
        if (rt_phase) rt_stalls++;
        else          rnd_stalls++;
      end
      if (in_valid && in_ready) begin
        if (sent == 0) rt_first = cycle;
        if (sent == P_RT - 1) rt_last = cycle;
        sent++;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (recv < P) begin
      out_ready = ($urandom_range(3) != 0);
      @(negedge clk);
    end
  end

  // ------------------------------------------------------------- checking
  initial begin
    recv = 0; bad_exact = 0; bad_real = 0; strips_seen = 0; cycle = 0;
  end

  always @(posedge clk) begin
    if (rst_n && strip_done) strips_seen++;
    cycle++;
    if (rst_n && out_valid && out_ready) begin
      if (recv >= P) begin
        bad_exact++;
        $display("unexpected extra output %0d", out_data);
      end else begin
        if (int'(out_data) != exp_g[recv]) begin
          if (bad_exact < 10)
            $display("output %0d: got %0d expected %0d", recv, out_data, exp_g[recv]);
          bad_exact++;
        end
        if ((real'(out_data) - exp_r[recv]) > 2.0 || (exp_r[recv] - real'(out_data)) > 2.0) begin
          if (bad_real < 10)
            $display("output %0d: got %0d, real DCT %f", recv, out_data, exp_r[recv]);
          bad_real++;
        end
      end
      recv++;
    end
  end

  // summary once everything has come out
  always_comb done = (recv >= P) && (sent >= P);

  always_comb begin
    checks   = 2 * recv + 3;
    failures = bad_exact + bad_real
             + (rt_stalls != 0 ? 1 : 0)                       // real-time rate broken
             + ((P_RT > 0 && rt_last - rt_first != P_RT - 1) ? 1 : 0)
             + (strips_seen != STRIPS ? 1 : 0);
  end
endmodule
