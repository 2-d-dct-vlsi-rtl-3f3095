// dct_mac: the arithmetic datapath of a processing element.
//
// In one cycle it forms  sum = coef * operand + addend, where
//   operand is picked by the first MUX: the pixel from the I/O buffer
//           (zero-extended, sel_y = 0) or a first-stage result y from the
//           Y-FIFO (sel_y = 1);
//   addend  is picked by the second MUX: zero (first term of a sum), the
//           r state variable from the R-FIFO, or the q state variable from
//           the Q-FIFO.
// Purely combinational; the PE registers the sum into a FIFO. The structure
// (two MUXes, one multiplier, one adder, one multiply and one add per cycle)
// follows the PE datapath of the architecture; the widths are this design's.
module dct_mac
  import dct_pkg::*;
#(
  parameter int PW = PIX_W,
  parameter int YW = Y_W,
  parameter int CW = COEF_W,
  parameter int AW = ACC_W
) (
  input  logic                 sel_y,     // operand MUX: 0 pixel, 1 y
  input  logic [1:0]           add_sel,   // addend MUX: 0 zero, 1 r, 2 q
  input  logic [PW-1:0]        pix,
  input  logic signed [YW-1:0] y,
  input  logic signed [CW-1:0] coef,
  input  logic signed [AW-1:0] r_in,
  input  logic signed [AW-1:0] q_in,
  output logic signed [AW-1:0] sum
);
  localparam int OPW = (YW > PW + 1) ? YW : PW + 1;

  logic signed [OPW-1:0]    operand;
  logic signed [OPW+CW-1:0] product;
  logic signed [AW-1:0]     addend;

  always_comb begin
    operand = sel_y ? OPW'(y) : OPW'($signed({1'b0, pix}));
    product = operand * coef;
    unique case (add_sel)
      2'd1:    addend = r_in;
      2'd2:    addend = q_in;
      default: addend = '0;
    endcase
    sum = AW'(product) + addend;
  end
endmodule
