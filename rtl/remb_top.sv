// remb_top: reconfigurable multiplier blocks (ReMB) and the DCT loop that
// uses one.
//
// Four independent parts stand side by side, each with its own ports:
//   dct_*   the time-multiplexed 8-point Goertzel DCT loop
//           (goertzel_dct_loop), whose coefficient multiplier is the
//           four-structure ReMB remb_dct_loop_mult. Clocked.
//   kern_*  the three-structure ReMB for the reconfigurable DCT kernel
//           (remb_dct_kernel_mult): kern_p = kern_x * {39,150,196,...}
//           chosen by kern_sel. Combinational.
//   bs_*    the single basic structure with all inputs from x
//           (remb_basic_example): 5x, -3x, 3x or -x. Combinational.
//   cas_*   a cascade of two basic structures (remb_cascade2) in the form
//           CAS_FORM. Combinational.
// The DCT kernel around the second ReMB belongs to another design and is not
// included; its multiplier is brought out through the kern_* ports.
// See the submodules for the timing of each part.
module remb_top
  import remb_pkg::*;
#(
  parameter int unsigned   W_IN     = 12,
  parameter int unsigned   SW       = W_IN + 8,
  parameter int unsigned   FRAME_N  = 8,
  parameter int unsigned   W        = 16,
  parameter cascade_form_e CAS_FORM = FORM_E
) (
  input  logic                  clk,
  input  logic                  rst_n,

  input  logic                  dct_in_valid,
  output logic                  dct_in_ready,
  input  logic signed [W_IN-1:0] dct_in_sample,
  output logic                  dct_out_valid,
  output logic [2:0]            dct_out_k,
  output logic signed [SW-1:0]  dct_out_y,
  output logic                  dct_out_last,
  output logic                  dct_out_coef_missing,

  input  logic signed [W-1:0]   kern_x,
  input  logic [2:0]            kern_sel,
  output logic signed [W+8:0]   kern_p,

  input  logic signed [W-1:0]   bs_x,
  input  logic                  bs_s,
  input  logic                  bs_add_sub,
  output logic signed [W+2:0]   bs_q,

  input  logic signed [W-1:0]   cas_x,
  input  logic                  cas_s1,
  input  logic                  cas_add_sub1,
  input  logic                  cas_s2,
  input  logic                  cas_add_sub2,
  output logic signed [W+9:0]   cas_n1,
  output logic signed [W+9:0]   cas_q
);

  goertzel_dct_loop #(
    .W_IN    (W_IN),
    .SW      (SW),
    .FRAME_N (FRAME_N)
  ) u_dct (
    .clk              (clk),
    .rst_n            (rst_n),
    .in_valid         (dct_in_valid),
    .in_ready         (dct_in_ready),
    .in_sample        (dct_in_sample),
    .out_valid        (dct_out_valid),
    .out_k            (dct_out_k),
    .out_y            (dct_out_y),
    .out_last         (dct_out_last),
    .out_coef_missing (dct_out_coef_missing)
  );

  remb_dct_kernel_mult #(.W(W)) u_kern (
    .x   (kern_x),
    .sel (kern_sel),
    .p   (kern_p)
  );

  remb_basic_example #(.W(W)) u_bs (
    .x       (bs_x),
    .s       (bs_s),
    .add_sub (bs_add_sub),
    .q       (bs_q)
  );

  remb_cascade2 #(.W(W), .FORM(CAS_FORM), .OG(10)) u_cas (
    .x        (cas_x),
    .s1       (cas_s1),
    .add_sub1 (cas_add_sub1),
    .s2       (cas_s2),
    .add_sub2 (cas_add_sub2),
    .n1       (cas_n1),
    .q        (cas_q)
  );

endmodule
