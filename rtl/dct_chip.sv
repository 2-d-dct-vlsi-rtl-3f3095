// dct_chip: one 2-D DCT chip built from 2M processing elements.
//
// Row i of the array (first stage) holds M PEs, each transforming whole image
// rows of a strip: PE i gets strip row ROW_BASE+i from the input controller
// and emits, per T-pixel block, the T values of that row's 1-D DCT (y).
// Row ii (second stage) holds M PEs fed by the PE above through its Y-FIFO;
// they form a chain that accumulates the column transform: each PE adds its
// A[k][row]*y term to the q state variable received from its left neighbour
// and passes q on. No transposition memory is needed: the column sums are
// built up while the rows flow down the chain.
//
// Alone (T = M, CHAIN_HEAD = CHAIN_TAIL = 1) the chip is a complete T x T
// 2-D DCT; with T = M * chips, several chips sharing the input bus and
// linked through q_in_* / out_* form a larger transform.
//
// Output order, per strip of T image rows: for each T x T block from left to
// right, for each column l = 0..T-1, the coefficients V[k][l], k = 0..T-1.
// out_data carries the integer coefficient sign-extended to ACC_W bits on a
// tail chip and the raw q state variable on any other chip. All streams are
// valid/ready. With the default buffer depths (a row per I/O buffer, a row
// of q per Q-FIFO) the chip accepts one pixel every cycle without stalling.
//
// Following the architecture: the 2 x M PE arrangement, row-wise input, y
// passed down and q passed along, chip cascading. This design's choices:
// buffer depths, handshakes and the ROW_BASE/CHAIN_* cascade parameters.
module dct_chip
  import dct_pkg::*;
#(
  parameter int N           = 1024,
  parameter int M           = 4,
  parameter int T           = M,
  parameter int ROW_BASE    = 0,
  parameter bit CHAIN_HEAD  = 1'b1,
  parameter bit CHAIN_TAIL  = 1'b1,
  parameter int IBUF_DEPTH  = N,
  parameter int YFIFO_DEPTH = 2 * T,
  parameter int QFIFO_DEPTH = N + 2 * T
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // progressively scanned pixel stream (shared input bus)
  input  logic                    in_valid,
  input  logic [PIX_W-1:0]        in_data,
  output logic                    in_ready,
  // q chain from the previous chip (unused on a head chip)
  input  logic                    q_in_valid,
  input  logic signed [ACC_W-1:0] q_in_data,
  output logic                    q_in_ready,
  // q chain to the next chip, or the DCT output on a tail chip
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] out_data,
  input  logic                    out_ready,
  output logic                    strip_done
);
  logic [M-1:0]        pe_valid, pe_ready;
  logic [PIX_W-1:0]    pe_data;

  logic [M-1:0]                    y_valid, y_ready;
  logic signed [ACC_W-1:0]         y_data [M];
  logic [M:0]                      q_valid, q_ready;
  logic signed [ACC_W-1:0]         q_data [M+1];

  dct_input_ctrl #(.N(N), .T(T), .M(M), .ROW_BASE(ROW_BASE)) u_in_ctrl (
    .clk, .rst_n,
    .in_valid, .in_data, .in_ready,
    .pe_valid, .pe_data, .pe_ready,
    .strip_done
  );

  assign q_valid[0]  = q_in_valid;
  assign q_data[0]   = q_in_data;
  assign q_in_ready  = q_ready[0];

  for (genvar i = 0; i < M; i++) begin : g_col
    localparam pe_role_e COL_ROLE =
        (CHAIN_HEAD && i == 0)     ? ROLE_COL_HEAD :
        (CHAIN_TAIL && i == M - 1) ? ROLE_COL_TAIL : ROLE_COL_MID;
    logic unused_pix_ready, unused_y_ready, unused_q_ready;

    // first stage: image row ROW_BASE+i of every strip
    dct_pe #(
      .T(T), .ROLE(ROLE_ROW), .ROW(ROW_BASE + i),
      .IBUF_DEPTH(IBUF_DEPTH), .YFIFO_DEPTH(YFIFO_DEPTH), .QFIFO_DEPTH(QFIFO_DEPTH)
    ) u_pe_row (
      .clk, .rst_n,
      .pix_valid(pe_valid[i]), .pix_data(pe_data), .pix_ready(pe_ready[i]),
      .y_valid  (1'b0), .y_data('0), .y_ready(unused_y_ready),
      .q_valid  (1'b0), .q_data('0), .q_ready(unused_q_ready),
      .out_valid(y_valid[i]), .out_data(y_data[i]), .out_ready(y_ready[i])
    );

    // second stage: term ROW_BASE+i of every column sum
    dct_pe #(
      .T(T), .ROLE(COL_ROLE), .ROW(ROW_BASE + i),
      .IBUF_DEPTH(IBUF_DEPTH), .YFIFO_DEPTH(YFIFO_DEPTH), .QFIFO_DEPTH(QFIFO_DEPTH)
    ) u_pe_col (
      .clk, .rst_n,
      .pix_valid(1'b0), .pix_data('0), .pix_ready(unused_pix_ready),
      .y_valid  (y_valid[i]), .y_data(y_data[i][Y_W-1:0]), .y_ready(y_ready[i]),
      .q_valid  (q_valid[i]), .q_data(q_data[i]), .q_ready(q_ready[i]),
      .out_valid(q_valid[i+1]), .out_data(q_data[i+1]), .out_ready(q_ready[i+1])
    );
  end

  assign out_valid   = q_valid[M];
  assign out_data    = q_data[M];
  assign q_ready[M]  = out_ready;
endmodule
