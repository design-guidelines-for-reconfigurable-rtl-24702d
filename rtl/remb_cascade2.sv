// remb_cascade2: cascade of two two-input ReMB basic structures.
//
// Stage 1 takes all of its inputs from x:
//     n1 = (x << SH_A1) op1 mux(s1; x << SH_B1, x << SH_C1)
// Stage 2 takes its common input and its two mux inputs from x or n1 as set
// by FORM (see cascade_form_e in remb_pkg):
//     q  = (srcA << SH_A2) op2 mux(s2; srcB << SH_B2, srcC << SH_C2)
// Forms A, B and C are regular (both mux inputs from the same node); forms D
// and E are hybrid (the mux inputs come from different nodes). With addition
// only, forms A, B, C and E give four different multiples of x and form D
// three, because when its mux picks x the result no longer depends on n1.
// Each stage has its own add/sub control (0 add, 1 subtract).
//
// The five topologies and the distinct-output counts follow the published
// forms. The published forms give no shift values, so the SH_* defaults (stage 1
// forms 5x or 9x, stage 2 weights 2, 1, 4) are this design's own, as is the
// choice of x on mux input 0 and n1 on input 1 in the hybrid forms.
// Combinational; q is W+OG bits, enough for the default shifts, and wraps
// modulo 2^(W+OG) for larger ones.
module remb_cascade2
  import remb_pkg::*;
#(
  parameter int unsigned   W     = 16,
  parameter cascade_form_e FORM  = FORM_E,
  parameter int unsigned   SH_A1 = 0,
  parameter int unsigned   SH_B1 = 2,
  parameter int unsigned   SH_C1 = 3,
  parameter int unsigned   SH_A2 = 1,
  parameter int unsigned   SH_B2 = 0,
  parameter int unsigned   SH_C2 = 2,
  parameter int unsigned   OG    = 10
) (
  input  logic signed [W-1:0]    x,
  input  logic                   s1,
  input  logic                   add_sub1,
  input  logic                   s2,
  input  logic                   add_sub2,
  output logic signed [W+OG-1:0] n1,
  output logic signed [W+OG-1:0] q
);

  localparam int unsigned IW = W + OG;

  logic signed [IW-1:0] xe;
  logic signed [IW-1:0] src_a, src_b, src_c;

  assign xe = IW'(x);

  remb_cell #(.W(IW), .CELL(CELL_ADDSUB)) u_stage1 (
    .a       (xe <<< SH_A1),
    .b       (xe <<< SH_B1),
    .c       (xe <<< SH_C1),
    .s       (s1),
    .add_sub (add_sub1),
    .q       (n1)
  );

  always_comb begin
    unique case (FORM)
      FORM_A:  begin src_a = n1; src_b = n1; src_c = n1; end
      FORM_B:  begin src_a = xe; src_b = n1; src_c = n1; end
      FORM_C:  begin src_a = n1; src_b = xe; src_c = xe; end
      FORM_D:  begin src_a = xe; src_b = xe; src_c = n1; end
      default: begin src_a = n1; src_b = xe; src_c = n1; end
    endcase
  end

  remb_cell #(.W(IW), .CELL(CELL_ADDSUB)) u_stage2 (
    .a       (src_a <<< SH_A2),
    .b       (src_b <<< SH_B2),
    .c       (src_c <<< SH_C2),
    .s       (s2),
    .add_sub (add_sub2),
    .q       (q)
  );

endmodule
