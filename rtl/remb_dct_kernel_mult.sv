// remb_dct_kernel_mult: reconfigurable multiplier block for the smaller
// 12-bit coefficients of a reconfigurable recursive DCT kernel, three basic
// structures in hybrid cascade.
//
//     n1 = 16x   + mux(sel[0];  4x,  -x)     ->  20x, 15x
//     n2 = 2*n1  + mux(sel[1];  -x,  8*n1)   ->  39x, 200x / 29x, 150x
//     p  = n2    + mux(sel[2];  -4x,  0)
// Select words {sel[2], sel[1], sel[0]} for the three constants:
//     39x  = 39x + 0       3'b100
//     150x = 150x + 0      3'b111
//     196x = 200x - 4x     3'b010
// The other select words give 35x, 200x, 25x, 29x and 146x.
// Node inputs, shifts, the constant-zero input and the partial products
// follow the published block diagram; the order of the inputs on each
// multiplexer is this design's choice (upper input of the drawing on 0).
//
// Combinational. p has 9 bits more than x, enough for 200x, so it never
// overflows.
module remb_dct_kernel_mult
  import remb_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] x,
  input  logic        [2:0]   sel,
  output logic signed [W+8:0] p
);

  localparam int unsigned IW = W + 9;

  logic signed [IW-1:0] xe, n1, n2;

  assign xe = IW'(x);

  remb_cell #(.W(IW), .CELL(CELL_1)) u_n1 (
    .a (xe <<< 4), .b (xe <<< 2), .c (-xe),
    .s (sel[0]), .add_sub (1'b0), .q (n1)
  );

  remb_cell #(.W(IW), .CELL(CELL_1)) u_n2 (
    .a (n1 <<< 1), .b (-xe), .c (n1 <<< 3),
    .s (sel[1]), .add_sub (1'b0), .q (n2)
  );

  remb_cell #(.W(IW), .CELL(CELL_1)) u_out (
    .a (n2), .b (-(xe <<< 2)), .c ('0),
    .s (sel[2]), .add_sub (1'b0), .q (p)
  );

endmodule
