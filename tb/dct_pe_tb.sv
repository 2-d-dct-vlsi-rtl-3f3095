// dct_pe_tb: processing element in both roles, T = 4.
//
// Part A, first stage (ROLE_ROW): random pixels with random gaps and random
// back-pressure on the y output; every y is compared with the rounded 1-D DCT
// of its block. With pixels always available and the output always ready the
// PE must emit a block of T results every T*T cycles (one multiply-add per
// cycle, T per pixel).
// Part B, second stage: a head PE (row 1) feeding its q values through the
// Q-FIFO of a tail PE (row 2), each with its own random y stream; every output
// must equal round((A[k][1]*y1 + A[k][2]*y2) / 2^16), and the output must come
// one per cycle while nothing is held back.
module dct_pe_tb;
  timeunit 1ns; timeprecision 1ps;
  import dct_pkg::*;
  import dct_tb_pkg::*;
  localparam int T = 4;
  localparam int NPIX = 400;   // part A pixels (100 blocks)
  localparam int NY   = 300;   // part B y values per stream

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ part A
  logic a_pv, a_pr, a_ov, a_or;
  logic [7:0] a_pd;
  logic signed [31:0] a_od;
  int  pix[$];
  int  a_sent = 0, a_recv = 0, a_stalls = 0;
  bit  a_free;                     // free-running phase: no gaps, no back-pressure
  int  burst_start[$];

  dct_pe #(.T(T), .ROLE(ROLE_ROW), .ROW(0), .IBUF_DEPTH(6)) u_pe_row (
    .clk, .rst_n,
    .pix_valid(a_pv), .pix_data(a_pd), .pix_ready(a_pr),
    .y_valid(1'b0), .y_data('0), .y_ready(),
    .q_valid(1'b0), .q_data('0), .q_ready(),
    .out_valid(a_ov), .out_data(a_od), .out_ready(a_or));

  initial begin
    for (int i = 0; i < NPIX; i++) pix.push_back(int'($urandom_range(255)));
    a_pv = 0; a_pd = 0; a_or = 1; a_free = 1;
    @(posedge rst_n);
    while (a_sent < NPIX) begin
      @(negedge clk);
      a_free = (a_sent < NPIX / 2);
      a_pv = a_free ? 1'b1 : ($urandom_range(3) != 0);
      a_pd = 8'(pix[a_sent]);
      a_or = a_free ? 1'b1 : ($urandom_range(1) != 0);
      @(posedge clk);
      if (a_pv && a_pr) a_sent++;
    end
    @(negedge clk);
    a_pv = 0;
    forever begin
      a_or = ($urandom_range(1) != 0);
      @(negedge clk);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (a_ov && !a_or) failures++;       // valid only with ready
    // a whole block has gone in but its results are not all out, and the
    // consumer is not ready: the PE is held back
    if (!a_or && (a_sent / T) > (a_recv / T)) a_stalls++;
    if (a_ov && a_or) begin
      int b, k;
      longint s;
      b = a_recv / T; k = a_recv % T;
      s = 0;
      for (int j = 0; j < T; j++) s += longint'(ref_coef(T, k, j)) * pix[b * T + j];
      check(a_od == 32'(rshift_rnd(s, 8)),
            $sformatf("row PE y[%0d][%0d] got %0d expected %0d", b, k, a_od, rshift_rnd(s, 8)));
      if (k == 0 && b < 40) burst_start.push_back(cycle);
      a_recv++;
    end
  end

  // ------------------------------------------------------------ part B
  logic h_yv, h_yr, t_yv, t_yr, hq_v, hq_r, t_ov, t_or;
  logic signed [15:0] h_yd, t_yd;
  logic signed [31:0] hq_d, t_od;
  int  y1[$], y2[$];
  int  h_sent = 0, t_sent = 0, b_recv = 0, b_holds = 0;

  dct_pe #(.T(T), .ROLE(ROLE_COL_HEAD), .ROW(1), .YFIFO_DEPTH(2)) u_pe_head (
    .clk, .rst_n,
    .pix_valid(1'b0), .pix_data('0), .pix_ready(),
    .y_valid(h_yv), .y_data(h_yd), .y_ready(h_yr),
    .q_valid(1'b0), .q_data('0), .q_ready(),
    .out_valid(hq_v), .out_data(hq_d), .out_ready(hq_r));

  dct_pe #(.T(T), .ROLE(ROLE_COL_TAIL), .ROW(2), .YFIFO_DEPTH(2), .QFIFO_DEPTH(5)) u_pe_tail (
    .clk, .rst_n,
    .pix_valid(1'b0), .pix_data('0), .pix_ready(),
    .y_valid(t_yv), .y_data(t_yd), .y_ready(t_yr),
    .q_valid(hq_v), .q_data(hq_d), .q_ready(hq_r),
    .out_valid(t_ov), .out_data(t_od), .out_ready(t_or));

  initial begin
    for (int i = 0; i < NY; i++) begin
      y1.push_back(int'($urandom_range(65535)) - 32768);
      y2.push_back(int'($urandom_range(65535)) - 32768);
    end
    h_yv = 0; t_yv = 0; h_yd = 0; t_yd = 0; t_or = 1;
    @(posedge rst_n);
    fork
      while (h_sent < NY) begin
        @(negedge clk);
        h_yv = ($urandom_range(1) != 0);
        h_yd = 16'(y1[h_sent]);
        @(posedge clk);
        if (h_yv && h_yr) h_sent++;
      end
      begin
        repeat (40) @(posedge clk);     // tail's y stream starts late
        while (t_sent < NY) begin
          @(negedge clk);
          t_yv = ($urandom_range(1) != 0);
          t_yd = 16'(y2[t_sent]);
          @(posedge clk);
          if (t_yv && t_yr) t_sent++;
        end
      end
      forever begin
        @(negedge clk);
        t_or = (b_recv < NY * T / 2) ? ($urandom_range(3) != 0) : 1'b1;
      end
    join_none
  end

  always @(negedge clk) begin
    if (h_sent >= NY) h_yv = 0;
    if (t_sent >= NY) t_yv = 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (!t_or && h_sent > b_recv / T && t_sent > b_recv / T) b_holds++;
    if (t_ov && t_or) begin
      int i, k;
      longint s;
      i = b_recv / T; k = b_recv % T;
      s = longint'(ref_coef(T, k, 1)) * y1[i] + longint'(ref_coef(T, k, 2)) * y2[i];
      check(t_od == 32'(rshift_rnd(s, 16)),
            $sformatf("column chain g[%0d][%0d] got %0d expected %0d", i, k, t_od, rshift_rnd(s, 16)));
      b_recv++;
    end
  end

  // ------------------------------------------------------------- summary
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (a_recv == NPIX && b_recv == NY * T);
    repeat (5) @(posedge clk);
    // rate: in the free-running phase one block of T results every T*T cycles
    for (int i = 5; i < 30; i++)
      check(burst_start[i] - burst_start[i-1] == T * T,
            $sformatf("row PE block interval %0d", burst_start[i] - burst_start[i-1]));
    check(a_stalls > 0, "row PE stalled by back-pressure");
    check(b_holds > 0, "tail PE held by back-pressure");
    $display("row PE: %0d results, %0d stall cycles; chain: %0d results, %0d held cycles",
             a_recv, a_stalls, b_recv, b_holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
