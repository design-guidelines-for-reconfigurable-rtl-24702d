// remb_pkg: types and constants shared by the reconfigurable multiplier
// block (ReMB) modules.
//
// A ReMB is a multiplier block for a fixed set of constants in which each
// adder node may carry a multiplexer on one or more of its inputs. A node
// therefore produces several partial products, one per select setting, and a
// whole block produces one of its constants per select word. This package
// holds the cell types of the two-input basic structure, the cascade forms of
// two basic structures, and the per-bin coefficient table of the 8-point
// Goertzel DCT loop.
//
// The cell types and cascade forms follow the published structures. The
// binary encodings, and the select words of the coefficient table (which
// depend on the mux-input order chosen in remb_dct_loop_mult), are this
// design's own.
package remb_pkg;

  // Operation of the two-input basic structure q = a op mux(b, c).
  //   CELL_ADDSUB : op taken from a separate add/sub control (0 add, 1 sub)
  //   CELL_1      : s=0 a+b,  s=1 a+c
  //   CELL_2      : s=0 a-b,  s=1 a-c
  //   CELL_3      : s=0 a+b,  s=1 a-c  (select also sets the operation)
  typedef enum logic [1:0] {
    CELL_ADDSUB = 2'd0,
    CELL_1      = 2'd1,
    CELL_2      = 2'd2,
    CELL_3      = 2'd3
  } cell_type_e;

  // Topology of a cascade of two basic structures. Stage 1 takes all of its
  // inputs from x; the forms differ in where stage 2 takes its inputs from.
  //   FORM_A : common n1, mux {n1, n1}   (regular)
  //   FORM_B : common x,  mux {n1, n1}   (regular)
  //   FORM_C : common n1, mux {x,  x }   (regular)
  //   FORM_D : common x,  mux {x,  n1}   (hybrid)
  //   FORM_E : common n1, mux {x,  n1}   (hybrid)
  typedef enum logic [2:0] {
    FORM_A = 3'd0,
    FORM_B = 3'd1,
    FORM_C = 3'd2,
    FORM_D = 3'd3,
    FORM_E = 3'd4
  } cascade_form_e;

  // How the Goertzel loop multiplies its state by 2*cos(k*pi/8).
  typedef enum logic [1:0] {
    COEF_ZERO = 2'd0,   // k = 4: coefficient 0
    COEF_TWO  = 2'd1,   // k = 0: coefficient 2, a one-bit left shift
    COEF_REMB = 2'd2    // k = 1..3, 5..7: product from the ReMB
  } coef_mode_e;

  // Select word of the DCT loop ReMB, one bit per multiplexer.
  typedef struct packed {
    logic s_out;   // output node mux:   0: 8*n1        1: n3
    logic s_n3;    // node n3 mux:       0: n1          1: -8*x
    logic s_n2;    // node n2 mux:       0: x           1: n1
    logic s_n1;    // node n1 mux:       0: 4*x         1: 8*x
  } loop_sel_t;

  typedef struct packed {
    coef_mode_e mode;
    logic       neg;        // negate the product (k = 5, 6, 7)
    loop_sel_t  sel;        // ReMB select word
    logic [3:0] shift;      // right shift applied to the ReMB product
    logic       avail;      // 0: the ReMB cannot form this constant
  } dct_coef_t;

  localparam int unsigned DCT_BINS = 8;

  // Coefficient table of the loop, k = 0..7.
  //   k=1,7 : 473 = 32*15 + (-7),  2cos(pi/8)  ~ 473/2^8
  //   k=3,5 : 392 = 32*11 + 8*5,   2cos(3pi/8) ~ 392/2^9
  //   k=2,6 : 362 (2cos(pi/4) ~ 362/2^8) has no select word in the block
  function automatic dct_coef_t dct_coef(input logic [2:0] k);
    dct_coef_t c;
    c = '{mode: COEF_REMB, neg: 1'b0, sel: '0, shift: 4'd8, avail: 1'b1};
    unique case (k)
      3'd0: c.mode = COEF_TWO;
      3'd1: begin c.sel = 4'b1110; c.shift = 4'd8; end
      3'd2: begin c.sel = 4'b0000; c.shift = 4'd8; c.avail = 1'b0; end
      3'd3: begin c.sel = 4'b0000; c.shift = 4'd9; end
      3'd4: c.mode = COEF_ZERO;
      3'd5: begin c.sel = 4'b0000; c.shift = 4'd9; c.neg = 1'b1; end
      3'd6: begin c.sel = 4'b0000; c.shift = 4'd8; c.neg = 1'b1; c.avail = 1'b0; end
      3'd7: begin c.sel = 4'b1110; c.shift = 4'd8; c.neg = 1'b1; end
      default: ;
    endcase
    return c;
  endfunction

endpackage
