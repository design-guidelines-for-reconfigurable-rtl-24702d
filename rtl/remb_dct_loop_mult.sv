// remb_dct_loop_mult: reconfigurable multiplier block of the 8-point
// Goertzel DCT loop, four basic structures in hybrid cascade.
//
// Nodes (weights are shifts or negated shifts of the node they name):
//     n1 = x       + mux(s_n1;  4x,    8x)       ->  5x, 9x
//     n2 = 2*n1    + mux(s_n2;  x,     n1)       ->  11x, 15x, 19x, 27x
//     n3 = x       + mux(s_n3;  n1,   -8x)       ->  6x, 10x, -7x
//     p  = 32*n2   + mux(s_out; 8*n1,  n3)
// The select word sel (loop_sel_t) sets the four multiplexers at once, and p
// is x times the constant chosen. The two products of the loop are
//     392x = 32*11x + 8*5x     sel = {s_out,s_n3,s_n2,s_n1} = 4'b0?00
//     473x = 32*15x + (-7x)    sel = 4'b1110
// The node inputs, shifts and partial products follow the published block
// diagram. That diagram also lists 362 among the outputs, but 362 = 32*11+10
// would need n1 = 5x (for n2 = 11x) and n1 = 9x (for n3 = 10x) in the same
// cycle, so no select word forms it; see the coefficient table in remb_pkg.
// The order of the inputs on each multiplexer is not printed and is this
// design's choice (upper input of the drawing on input 0).
//
// Combinational. p has 11 bits more than x, enough for the largest constant
// the block can form (936), so it never overflows.
module remb_dct_loop_mult
  import remb_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0]  x,
  input  loop_sel_t            sel,
  output logic signed [W+10:0] p
);

  localparam int unsigned IW = W + 11;

  logic signed [IW-1:0] xe, n1, n2, n3;

  assign xe = IW'(x);

  remb_cell #(.W(IW), .CELL(CELL_1)) u_n1 (
    .a (xe), .b (xe <<< 2), .c (xe <<< 3),
    .s (sel.s_n1), .add_sub (1'b0), .q (n1)
  );

  remb_cell #(.W(IW), .CELL(CELL_1)) u_n2 (
    .a (n1 <<< 1), .b (xe), .c (n1),
    .s (sel.s_n2), .add_sub (1'b0), .q (n2)
  );

  remb_cell #(.W(IW), .CELL(CELL_1)) u_n3 (
    .a (xe), .b (n1), .c (-(xe <<< 3)),
    .s (sel.s_n3), .add_sub (1'b0), .q (n3)
  );

  remb_cell #(.W(IW), .CELL(CELL_1)) u_out (
    .a (n2 <<< 5), .b (n1 <<< 3), .c (n3),
    .s (sel.s_out), .add_sub (1'b0), .q (p)
  );

endmodule
