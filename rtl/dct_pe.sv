// dct_pe: processing element of the state-space 2-D DCT array.
//
// Every PE has the same datapath (I/O buffer, coefficient buffer, operand MUX,
// multiplier, addend MUX, adder, Y-FIFO, R-FIFO, Q-FIFO) and performs one
// multiply-add per cycle; ROLE selects which stage of the transform it runs.
//
// ROLE_ROW (first stage, one image row per PE): each pixel x at position j of
// a T-pixel block takes T cycles, k = 0..T-1:
//   r_k = A[k][0]*x                     (j = 0,        into the R-FIFO)
//   r_k = A[k][j]*x + r_k               (0 < j < T-1,  R-FIFO read and rewritten)
//   y_k = A[k][T-1]*x + r_k             (j = T-1,      y_k sent on out_*)
// so the T outputs of a block are the 1-D DCT of that block's slice of the
// row. y_k leaves rounded to Y_W bits with Y_FRAC fractional bits.
//
// ROLE_COL_* (second stage, PE number ROW of the chain): each y taken from the
// Y-FIFO takes T cycles, k = 0..T-1:
//   q_k = A[k][ROW]*y + q_k(in)         (q_k(in) from the Q-FIFO; 0 for the head)
// and q_k is sent on out_* to the next PE's Q-FIFO. The tail PE rounds the sum
// to the integer DCT output g (OUT_W bits, sign-extended on out_data).
//
// Interfaces are valid/ready streams: pix_* into the I/O buffer, y_* into the
// Y-FIFO, q_* into the Q-FIFO; out_valid is asserted in the cycle a result is
// formed and is only asserted while out_ready is high (the consumer is a FIFO
// whose ready does not depend on valid). A PE stalls, without losing state,
// whenever its operand is missing or the consumer is full.
//
// Following the architecture: the stage equations, the FIFOs for r, q and y,
// the one multiply-add per cycle and the chaining of q. This design's choices:
// the valid/ready handshakes, the buffer depths, the fixed-point rounding and
// the per-role pruning of buffers a role never uses.
module dct_pe
  import dct_pkg::*;
#(
  parameter int       T           = 4,
  parameter pe_role_e ROLE        = ROLE_ROW,
  parameter int       ROW         = 0,      // row index in the T-row strip (column stage)
  parameter int       IBUF_DEPTH  = 1024,   // I/O buffer: one image row
  parameter int       YFIFO_DEPTH = 2 * T,
  parameter int       QFIFO_DEPTH = 1024 + 2 * T
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // pixel stream (first stage)
  input  logic                    pix_valid,
  input  logic [PIX_W-1:0]        pix_data,
  output logic                    pix_ready,
  // y stream from the first-stage PE above (second stage)
  input  logic                    y_valid,
  input  logic signed [Y_W-1:0]   y_data,
  output logic                    y_ready,
  // q state variables from the previous PE of the chain (second stage)
  input  logic                    q_valid,
  input  logic signed [ACC_W-1:0] q_data,
  output logic                    q_ready,
  // results: y (row role), q (head/middle), g (tail)
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] out_data,
  input  logic                    out_ready
);
  localparam int IW      = (T <= 2) ? 1 : $clog2(T);
  localparam bit IS_ROW  = (ROLE == ROLE_ROW);
  localparam bit IS_HEAD = (ROLE == ROLE_COL_HEAD);
  localparam bit IS_TAIL = (ROLE == ROLE_COL_TAIL);
  localparam int SH_Y    = COEF_FRAC - Y_FRAC;
  localparam int SH_G    = COEF_FRAC + Y_FRAC;

  logic [IW-1:0] k, j;
  logic          last_k, fire, emit;

  // operands presented by the buffers
  logic [PIX_W-1:0]        x_head;
  logic signed [Y_W-1:0]   y_head;
  logic signed [ACC_W-1:0] r_head, q_head;
  logic                    x_avail, y_avail, q_avail;
  logic                    x_pop, y_pop, q_pop, r_push, r_pop;

  logic signed [COEF_W-1:0] coef;
  logic signed [ACC_W-1:0]  sum, sum_rnd;
  logic [1:0]               add_sel;

  assign last_k = (k == IW'(T - 1));

  // ---------------------------------------------------------------- control
  always_comb begin
    if (IS_ROW) begin
      emit    = (j == IW'(T - 1));
      fire    = x_avail && (!emit || out_ready);
      add_sel = (j == '0) ? 2'd0 : 2'd1;
    end else begin
      emit    = 1'b1;
      fire    = y_avail && (IS_HEAD || q_avail) && out_ready;
      add_sel = IS_HEAD ? 2'd0 : 2'd2;
    end
    x_pop  = IS_ROW && fire && last_k;
    r_pop  = IS_ROW && fire && (j != '0);
    r_push = IS_ROW && fire && !emit;
    y_pop  = !IS_ROW && fire && last_k;
    q_pop  = !IS_ROW && !IS_HEAD && fire;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k <= '0;
      j <= '0;
    end else if (fire) begin
      k <= last_k ? '0 : k + 1'b1;
      if (IS_ROW && last_k) j <= (j == IW'(T - 1)) ? '0 : j + 1'b1;
    end
  end

  // ------------------------------------------------------------- datapath
  dct_coef_rom #(.T(T)) u_coef (
    .k   (k),
    .j   (IS_ROW ? j : IW'(ROW)),
    .coef(coef)
  );

  dct_mac u_mac (
    .sel_y  (!IS_ROW),
    .add_sel(add_sel),
    .pix    (x_head),
    .y      (y_head),
    .coef   (coef),
    .r_in   (r_head),
    .q_in   (q_head),
    .sum    (sum)
  );

  always_comb begin
    if (IS_ROW)
      sum_rnd = ACC_W'(Y_W'((sum + (ACC_W'(1) <<< (SH_Y - 1))) >>> SH_Y));
    else if (IS_TAIL)
      sum_rnd = ACC_W'(OUT_W'((sum + (ACC_W'(1) <<< (SH_G - 1))) >>> SH_G));
    else
      sum_rnd = sum;
  end

  assign out_valid = fire && emit;
  assign out_data  = sum_rnd;

  // -------------------------------------------------------------- buffers
  if (IS_ROW) begin : g_row
    logic ib_empty, ib_full, r_empty, r_full;

    dct_fifo #(.WIDTH(PIX_W), .DEPTH(IBUF_DEPTH)) u_io_buffer (
      .clk, .rst_n,
      .push (pix_valid && pix_ready),
      .din  (pix_data),
      .pop  (x_pop),
      .dout (x_head),
      .empty(ib_empty),
      .full (ib_full),
      .count()
    );

    dct_fifo #(.WIDTH(ACC_W), .DEPTH(T)) u_r_fifo (
      .clk, .rst_n,
      .push (r_push),
      .din  (sum),
      .pop  (r_pop),
      .dout (r_head),
      .empty(r_empty),
      .full (r_full),
      .count()
    );

    assign pix_ready = !ib_full;
    assign x_avail   = !ib_empty;
    assign y_ready   = 1'b0;
    assign q_ready   = 1'b0;
    assign y_head    = '0;
    assign y_avail   = 1'b0;
    assign q_head    = '0;
    assign q_avail   = 1'b0;

    // the r state variables of the previous pixel are always complete
    a_r_complete: assert property (@(posedge clk) disable iff (!rst_n) !(r_pop && r_empty))
      else $error("dct_pe: R-FIFO underrun");
  end else begin : g_col
    logic yf_empty, yf_full;

    dct_fifo #(.WIDTH(Y_W), .DEPTH(YFIFO_DEPTH)) u_y_fifo (
      .clk, .rst_n,
      .push (y_valid && y_ready),
      .din  (y_data),
      .pop  (y_pop),
      .dout (y_head),
      .empty(yf_empty),
      .full (yf_full),
      .count()
    );

    if (IS_HEAD) begin : g_head
      assign q_ready = 1'b0;
      assign q_head  = '0;
      assign q_avail = 1'b0;
    end else begin : g_chain
      logic qf_empty, qf_full;
      dct_fifo #(.WIDTH(ACC_W), .DEPTH(QFIFO_DEPTH)) u_q_fifo (
        .clk, .rst_n,
        .push (q_valid && q_ready),
        .din  (q_data),
        .pop  (q_pop),
        .dout (q_head),
        .empty(qf_empty),
        .full (qf_full),
        .count()
      );
      assign q_ready = !qf_full;
      assign q_avail = !qf_empty;
    end

    assign y_ready   = !yf_full;
    assign y_avail   = !yf_empty;
    assign pix_ready = 1'b0;
    assign x_head    = '0;
    assign x_avail   = 1'b0;
    assign r_head    = '0;
  end
endmodule
