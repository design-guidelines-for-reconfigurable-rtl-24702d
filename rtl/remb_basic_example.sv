// remb_basic_example: a single ReMB basic structure whose inputs all come from x.
//
// The common input is x, the multiplexer picks 4x (s=0) or 2x (s=1), and the
// add_sub control chooses the operation:
//     s add_sub   q
//     0    0      5x
//     0    1     -3x
//     1    0      3x
//     1    1      -x
// so one adder and one 2:1 multiplexer give four different multiples of x.
// The shifts (1, 4, 2), the mux-input numbering and the output table are the
// published example; the input width W and the signed two's-complement
// format are this design's choice. Combinational, no clock; q has three bits
// more than x and never overflows.
module remb_basic_example
  import remb_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] x,
  input  logic                s,
  input  logic                add_sub,
  output logic signed [W+2:0] q
);

  logic signed [W+2:0] xe;

  assign xe = (W+3)'(x);

  remb_cell #(.W(W + 3), .CELL(CELL_ADDSUB)) u_cell (
    .a       (xe),
    .b       (xe <<< 2),
    .c       (xe <<< 1),
    .s       (s),
    .add_sub (add_sub),
    .q       (q)
  );

endmodule
