// goertzel_dct_loop: recursive part of an 8-point Goertzel DCT, shared in
// time by the eight frequency bins and multiplying through one
// reconfigurable multiplier block.
//
// For every bin k the loop runs the second-order recursion
//     w_k[n] = s_k[n] + 2cos(k*pi/8) * w_k[n-1] - w_k[n-2]
//     y_k[n] = w_k[n] - w_k[n-1]
// with input s_k[n] = (-1)^k * in[n]. One hardware loop serves all bins: a
// sample is held for eight clock cycles and in cycle (slot) k the state pair
// of bin k is read, updated and written back, so the coefficient changes
// every cycle. The multiplication by 2cos(k*pi/8) is done by
// remb_dct_loop_mult for k = 1, 3, 5, 7 (products 473 and 392, right-shifted
// by 8 and 9 bits), by a one-bit shift for k = 0 and by zero for k = 4. The
// bins 5..7 reuse the products of bins 3..1 and negate them in the adder that
// follows. The block cannot form the 362 of k = 2 and 6; for those bins the
// loop still runs, using the block's select word 0, and flags each result
// with out_coef_missing.
//
// Samples are grouped into frames of FRAME_N; the first sample of a frame
// starts every bin from zero state and the outputs of the last sample carry
// out_last. After the last sample, out_y of bin k is the Goertzel result of
// that bin for the frame.
//
// Interface and timing:
//   in_valid/in_ready  sample handshake; a sample is taken on a clock edge
//                      with both high. in_ready is high when idle and in
//                      the last slot, so back-to-back samples are taken
//                      every 8 cycles; in_valid must hold, with a stable
//                      sample, until taken.
//   out_valid          one cycle per bin, bins in order 0..7, starting the
//                      cycle after the sample is taken (latency 1 to bin 0,
//                      8 to bin 7).
//   rst_n              active-low synchronous reset of the control and of
//                      the frame position; bin state needs no reset.
//
// The recursion, the input sign, the negation of bins 5..7 and the use of
// the block follow the published loop and multiplier. Word widths, integer
// arithmetic with floor rounding after the shift, the per-bin shift of 8 or
// 9 bits, the bypass of k = 0 and k = 4, the frame counter and the
// handshake are this design's own.
module goertzel_dct_loop
  import remb_pkg::*;
#(
  parameter int unsigned W_IN    = 12,
  parameter int unsigned SW      = W_IN + 8,
  parameter int unsigned FRAME_N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [W_IN-1:0] in_sample,
  output logic                 out_valid,
  output logic [2:0]           out_k,
  output logic signed [SW-1:0] out_y,
  output logic                 out_last,
  output logic                 out_coef_missing
);

  localparam int unsigned PW = SW + 11;
  localparam int unsigned CW = (FRAME_N > 1) ? $clog2(FRAME_N) : 1;

  // Control.
  logic                   busy;
  logic [2:0]             slot;
  logic signed [W_IN-1:0] x_q;
  logic                   first_q, last_q;
  logic [CW-1:0]          sample_idx;
  logic                   accept;

  // Bin state: w_k[n-1] and w_k[n-2].
  logic signed [SW-1:0] w1 [DCT_BINS];
  logic signed [SW-1:0] w2 [DCT_BINS];

  // Datapath of the current slot.
  dct_coef_t            coef;
  logic signed [SW-1:0] prev1, prev2, s_in, prod, w_new, y_new;
  logic signed [PW-1:0] remb_p;
  logic signed [SW-1:0] remb_shifted;

  assign in_ready = !busy || (slot == 3'(DCT_BINS - 1));
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      slot       <= '0;
      sample_idx <= '0;
      first_q    <= 1'b0;
      last_q     <= 1'b0;
      x_q        <= '0;
    end else if (accept) begin
      busy       <= 1'b1;
      slot       <= '0;
      x_q        <= in_sample;
      first_q    <= (sample_idx == '0);
      last_q     <= (sample_idx == CW'(FRAME_N - 1));
      sample_idx <= (sample_idx == CW'(FRAME_N - 1)) ? '0 : sample_idx + 1'b1;
    end else if (busy) begin
      if (slot == 3'(DCT_BINS - 1)) busy <= 1'b0;
      else                          slot <= slot + 1'b1;
    end
  end

  always_comb begin
    coef  = dct_coef(slot);
    prev1 = first_q ? '0 : w1[slot];
    prev2 = first_q ? '0 : w2[slot];
    s_in  = slot[0] ? -SW'(x_q) : SW'(x_q);
  end

  remb_dct_loop_mult #(.W(SW)) u_remb (
    .x   (prev1),
    .sel (coef.sel),
    .p   (remb_p)
  );

  // The shifted product fits the state width; the dropped bits are sign copies.
  assign remb_shifted = SW'(remb_p >>> coef.shift);

  always_comb begin
    unique case (coef.mode)
      COEF_ZERO: prod = '0;
      COEF_TWO:  prod = prev1 <<< 1;
      default:   prod = remb_shifted;
    endcase
    if (coef.neg) prod = -prod;
    w_new = s_in + prod - prev2;
    y_new = w_new - prev1;
  end

  always_ff @(posedge clk) begin
    if (busy) begin
      w1[slot] <= w_new;
      w2[slot] <= prev1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid        <= 1'b0;
      out_k            <= '0;
      out_y            <= '0;
      out_last         <= 1'b0;
      out_coef_missing <= 1'b0;
    end else begin
      out_valid        <= busy;
      out_k            <= slot;
      out_y            <= y_new;
      out_last         <= busy && last_q;
      out_coef_missing <= busy && !coef.avail;
    end
  end

  // A sample offered but not taken stays offered and unchanged.
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !in_ready) |=> (in_valid && $stable(in_sample)));

endmodule
