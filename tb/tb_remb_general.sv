// tb_remb_general: self-checking test of the generalized ReMB structure.
// Two instances: the default (two ports, multiplexer on port 1) and a
// three-port one whose ports carry 1, 3 and 2 multiplexer inputs. Random
// operands, selects (including out-of-range ones) and add/sub values are
// applied; the expected result is computed here from the definition
// q = d0 +/- d1 +/- ... with each operand picked by its select.
// A third instance has a 2:1 multiplexer on both inputs; fed with x = 1 at
// different shifts it must give twice as many different outputs (4) as the
// default form with one multiplexer (2).
module tb_remb_general;

  localparam int unsigned W = 16;
  localparam int unsigned B_MUX_N [3] = '{1, 3, 2};

  // Default instance.
  logic signed [W-1:0] a_din [2][2];
  logic        [0:0]   a_sel [2];
  logic                a_op;
  logic signed [W-1:0] a_q;

  // Three-port instance.
  logic signed [W-1:0] b_din [3][3];
  logic        [1:0]   b_sel [3];
  logic                b_op;
  logic signed [W-1:0] b_q;

  // Two multiplexers, one per input.
  localparam int unsigned C_MUX_N [2] = '{2, 2};
  logic signed [W-1:0] c_din [2][2];
  logic        [0:0]   c_sel [2];
  logic signed [W-1:0] c_q;

  int checks = 0, failures = 0;

  remb_general #(.W(W)) dut_a (.din(a_din), .sel(a_sel), .add_sub(a_op), .q(a_q));

  remb_general #(.W(W), .N_PORTS(3), .MAX_M(3), .MUX_N(B_MUX_N))
    dut_b (.din(b_din), .sel(b_sel), .add_sub(b_op), .q(b_q));

  function automatic logic signed [W-1:0] pick(input int n, input int s,
                                               input logic signed [W-1:0] v0,
                                               input logic signed [W-1:0] v1,
                                               input logic signed [W-1:0] v2);
    if (n == 1 || s >= n) return v0;
    if (s == 0) return v0;
    if (s == 1) return v1;
    return v2;
  endfunction

  remb_general #(.W(W), .N_PORTS(2), .MAX_M(2), .MUX_N(C_MUX_N))
    dut_c (.din(c_din), .sel(c_sel), .add_sub(1'b0), .q(c_q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    // Distinct outputs: one multiplexer (default) against two.
    begin
      longint one_mux [$], two_mux [$];
      a_din[0] = '{16'sd1, 16'sd1};  a_din[1] = '{16'sd4, 16'sd8};  a_op = 0;
      c_din[0] = '{16'sd1, 16'sd2};  c_din[1] = '{16'sd4, 16'sd8};
      for (int sv = 0; sv < 4; sv++) begin
        a_sel[0] = 1'(sv >> 1); a_sel[1] = 1'(sv);
        c_sel[0] = 1'(sv >> 1); c_sel[1] = 1'(sv);
        #1;
        if (!(longint'(a_q) inside {one_mux})) one_mux.push_back(longint'(a_q));
        if (!(longint'(c_q) inside {two_mux})) two_mux.push_back(longint'(c_q));
      end
      checks++;
      if (one_mux.size() !== 2 || two_mux.size() !== 4) begin
        failures++;
        $display("FAIL distinct outputs: one mux %0d, two muxes %0d", one_mux.size(), two_mux.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] e, o0, o1, o2;
    for (int it = 0; it < 400; it++) begin
      foreach (a_din[p, i]) a_din[p][i] = W'($urandom);
      foreach (a_sel[p])    a_sel[p]    = 1'($urandom);
      a_op = 1'($urandom);
      foreach (b_din[p, i]) b_din[p][i] = W'($urandom);
      foreach (b_sel[p])    b_sel[p]    = 2'($urandom);
      b_op = 1'($urandom);
      #1;
      o0 = a_din[0][0];
      o1 = a_sel[1] ? a_din[1][1] : a_din[1][0];
      e  = a_op ? o0 - o1 : o0 + o1;
      checks++;
      if (a_q !== e) begin
        failures++;
        $display("FAIL default: op=%0d q=%0d exp=%0d", a_op, a_q, e);
      end
      o0 = b_din[0][0];
      o1 = pick(3, int'(b_sel[1]), b_din[1][0], b_din[1][1], b_din[1][2]);
      o2 = pick(2, int'(b_sel[2]), b_din[2][0], b_din[2][1], b_din[2][2]);
      e  = b_op ? o0 - o1 - o2 : o0 + o1 + o2;
      checks++;
      if (b_q !== e) begin
        failures++;
        $display("FAIL 3-port: sel=%0d,%0d op=%0d q=%0d exp=%0d",
                 b_sel[1], b_sel[2], b_op, b_q, e);
      end
    end
    // Distinct outputs: one multiplexer (default) against two.
    begin
      longint one_mux [$], two_mux [$];
      a_din[0] = '{16'sd1, 16'sd1};  a_din[1] = '{16'sd4, 16'sd8};  a_op = 0;
      c_din[0] = '{16'sd1, 16'sd2};  c_din[1] = '{16'sd4, 16'sd8};
      for (int sv = 0; sv < 4; sv++) begin
        a_sel[0] = 1'(sv >> 1); a_sel[1] = 1'(sv);
        c_sel[0] = 1'(sv >> 1); c_sel[1] = 1'(sv);
        #1;
        if (!(longint'(a_q) inside {one_mux})) one_mux.push_back(longint'(a_q));
        if (!(longint'(c_q) inside {two_mux})) two_mux.push_back(longint'(c_q));
      end
      checks++;
      if (one_mux.size() !== 2 || two_mux.size() !== 4) begin
        failures++;
        $display("FAIL distinct outputs: one mux %0d, two muxes %0d", one_mux.size(), two_mux.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
