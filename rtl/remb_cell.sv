// remb_cell: two-input basic structure of a ReMB, q = a op mux(b, c).
//
// The common input a feeds the adder directly; b and c reach its second input
// through a 2:1 multiplexer with select s (s=0 picks b). The parameter CELL
// fixes the operation as in the published cell table:
//   CELL_1      s=0: a+b   s=1: a+c
//   CELL_2      s=0: a-b   s=1: a-c
//   CELL_3      s=0: a+b   s=1: a-c
//   CELL_ADDSUB operation from the add_sub input (0 add, 1 subtract)
// add_sub is ignored by the three fixed cell types.
//
// Built on remb_general with two ports, the first without a multiplexer.
// Combinational; all operands and q are W bits wide and the result wraps
// modulo 2^W, so the caller sizes W for its largest partial product.
module remb_cell
  import remb_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter cell_type_e  CELL = CELL_1
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic signed [W-1:0] c,
  input  logic                s,
  input  logic                add_sub,
  output logic signed [W-1:0] q
);

  logic signed [W-1:0] din [2][2];
  logic        [0:0]   sel [2];
  logic                op_sub;

  always_comb begin
    unique case (CELL)
      CELL_1:  op_sub = 1'b0;
      CELL_2:  op_sub = 1'b1;
      CELL_3:  op_sub = s;
      default: op_sub = add_sub;
    endcase
  end

  assign din[0][0] = a;
  assign din[0][1] = a;
  assign din[1][0] = b;
  assign din[1][1] = c;
  assign sel[0]    = 1'b0;
  assign sel[1]    = s;

  remb_general #(
    .W       (W),
    .N_PORTS (2),
    .MAX_M   (2),
    .MUX_N   ('{1, 2})
  ) u_core (
    .din     (din),
    .sel     (sel),
    .add_sub (op_sub),
    .q       (q)
  );

endmodule
