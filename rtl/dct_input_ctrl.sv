// dct_input_ctrl: input data control of a chip.
//
// The image arrives as one progressively scanned pixel stream, row after
// row, N pixels per row. Rows are grouped in strips of T rows (one strip is
// the T x N data block one transform pass works on); row t of every strip
// goes to the first-stage PE that owns it, so that PE always works on whole
// rows. A chip owns the M strip rows ROW_BASE .. ROW_BASE+M-1; pixels of the
// other rows are accepted and dropped, as another chip on the shared bus
// takes them. Two counters (column and row within the strip) are all the
// control there is, since the stream needs no reordering.
//
// Interface: in_valid/in_ready stream in; one shared data bus pe_data with
// a valid per PE (pe_valid[i]) and a ready per PE (pe_ready[i]). in_ready is
// high when the owning PE can take the pixel, or always for a row the chip
// does not own. It does not depend on in_valid. Zero-latency (combinational
// steering). Row-by-row assignment to PEs follows the architecture; the
// handshake is this design's choice.
module dct_input_ctrl
  import dct_pkg::*;
#(
  parameter int N        = 1024,  // pixels per image row
  parameter int T        = 4,     // rows per strip (transform size)
  parameter int M        = 4,     // first-stage PEs on this chip
  parameter int ROW_BASE = 0      // first strip row this chip owns
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_data,
  output logic             in_ready,
  output logic [M-1:0]     pe_valid,
  output logic [PIX_W-1:0] pe_data,
  input  logic [M-1:0]     pe_ready,
  output logic             strip_done   // pulses with the last pixel of a strip
);
  localparam int CW = (N <= 2) ? 1 : $clog2(N);
  localparam int RW = (T <= 2) ? 1 : $clog2(T);

  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic          mine, fire;
  int unsigned   target;

  assign mine     = (int'(row) >= ROW_BASE) && (int'(row) < ROW_BASE + M);
  assign target   = mine ? unsigned'(int'(row) - ROW_BASE) : 0;
  assign in_ready = mine ? pe_ready[target] : 1'b1;
  assign fire     = in_valid && in_ready;
  assign pe_data  = in_data;
  assign strip_done = fire && (col == CW'(N - 1)) && (row == RW'(T - 1));

  always_comb begin
    pe_valid = '0;
    if (mine) pe_valid[target] = in_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0;
      row <= '0;
    end else if (fire) begin
      if (col == CW'(N - 1)) begin
        col <= '0;
        row <= (row == RW'(T - 1)) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end
endmodule
