// remb_general: generalized basic structure of a reconfigurable multiplier
// block (ReMB).
//
// An adder with N_PORTS operands, each operand taken through its own
// multiplexer. Port p has MUX_N[p] inputs and its own select line sel[p]; a
// port with MUX_N[p] = 1 has no multiplexer and ignores its select. The
// add_sub control sets the operation: 0 sums all operands, 1 subtracts every
// operand after the first from the first (q = d0 - d1 - ... ).
//
// The inputs are expected already shifted: in a multiplier block the shifts
// are wiring in front of the structure. Purely combinational, no clock.
// Inputs and output share one width W; the caller sizes W for the largest
// partial product, and the sum wraps modulo 2^W.
//
// The n-input adder with optional multiplexers and one add/sub control follows
// the published generalized form. The meaning of add/sub for more than two
// operands, the handling of a select value at or above MUX_N[p] (treated as
// input 0) and the array port layout are this design's own choices.
module remb_general #(
  parameter int unsigned W       = 16,
  parameter int unsigned N_PORTS = 2,
  parameter int unsigned MAX_M   = 2,
  parameter int unsigned MUX_N [N_PORTS] = '{1, 2},
  localparam int unsigned SW     = (MAX_M > 1) ? $clog2(MAX_M) : 1
) (
  input  logic signed [W-1:0]  din [N_PORTS][MAX_M],
  input  logic        [SW-1:0] sel [N_PORTS],
  input  logic                 add_sub,
  output logic signed [W-1:0]  q
);

  logic signed [W-1:0] operand [N_PORTS];

  // Per-port multiplexers.
  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      if (MUX_N[p] <= 1 || int'(sel[p]) >= int'(MUX_N[p])) operand[p] = din[p][0];
      else                                          operand[p] = din[p][sel[p]];
    end
  end

  // Adder/subtractor over all ports.
  always_comb begin
    q = operand[0];
    for (int p = 1; p < N_PORTS; p++) begin
      if (add_sub) q = q - operand[p];
      else         q = q + operand[p];
    end
  end

endmodule
