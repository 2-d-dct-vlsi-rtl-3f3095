// dct_fifo: first-word-fall-through FIFO used for every buffer of a
// processing element: the I/O buffer (pixels), the Y-FIFO (first-stage
// results), the R-FIFO (row state variables r) and the Q-FIFO (column state
// variables q passed from the previous PE).
//
// The head word is always visible on dout while empty is low; pop removes it
// at the clock edge. A push and a pop may happen in the same cycle even when
// the FIFO is full, which the R-FIFO relies on (it is read and rewritten in
// the same order every cycle). DEPTH need not be a power of two. Storage is a
// plain array without reset; only the pointers and the count are reset.
// Using FIFOs between PEs follows the architecture; the first-word-fall-through
// behaviour and the simultaneous push/pop rule are this design's choices.
module dct_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH <= 2) ? 1 : $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [CW-1:0]    cnt;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = (cnt == '0);
  assign full  = (cnt == CW'(DEPTH));
  assign count = cnt;
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      case ({push, pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  // Handshake rules: no pop from an empty FIFO, no push into a full one
  // unless a word leaves in the same cycle.
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("dct_fifo: pop while empty");
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("dct_fifo: push while full");
endmodule
