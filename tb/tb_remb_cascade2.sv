// tb_remb_cascade2: self-checking test of the five cascade forms of two
// basic structures, one instance per form with the default shifts
// (stage 1: x + 4x or 8x, stage 2 weights 2, 1, 4).
//  * For x = 1 and addition only, the number of different outputs over the
//    four select settings must be 4 for forms A, B, C, E and 3 for form D.
//  * For random x and every select and add/sub setting, q and n1 must match
//    the form's equation computed here.
module tb_remb_cascade2;
  import remb_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned OG = 10;

  logic signed [W-1:0]    x;
  logic                   s1, s2, op1, op2;
  logic signed [W+OG-1:0] n1 [5], q [5];

  int checks = 0, failures = 0;

  remb_cascade2 #(.W(W), .FORM(FORM_A)) dut_a (.x, .s1, .add_sub1(op1), .s2, .add_sub2(op2), .n1(n1[0]), .q(q[0]));
  remb_cascade2 #(.W(W), .FORM(FORM_B)) dut_b (.x, .s1, .add_sub1(op1), .s2, .add_sub2(op2), .n1(n1[1]), .q(q[1]));
  remb_cascade2 #(.W(W), .FORM(FORM_C)) dut_c (.x, .s1, .add_sub1(op1), .s2, .add_sub2(op2), .n1(n1[2]), .q(q[2]));
  remb_cascade2 #(.W(W), .FORM(FORM_D)) dut_d (.x, .s1, .add_sub1(op1), .s2, .add_sub2(op2), .n1(n1[3]), .q(q[3]));
  remb_cascade2 #(.W(W), .FORM(FORM_E)) dut_e (.x, .s1, .add_sub1(op1), .s2, .add_sub2(op2), .n1(n1[4]), .q(q[4]));

  // Expected stage-2 result of form f for stage-1 value m.
  function automatic longint model(input int f, input longint xv, input longint m,
                                   input bit sel2, input bit sub2);
    longint a, b, c, mx;
    case (f)
      0: begin a = m;  b = m;  c = m;  end
      1: begin a = xv; b = m;  c = m;  end
      2: begin a = m;  b = xv; c = xv; end
      3: begin a = xv; b = xv; c = m;  end
      default: begin a = m; b = xv; c = m; end
    endcase
    mx = sel2 ? 4 * c : b;
    return sub2 ? 2 * a - mx : 2 * a + mx;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int expected_count [5] = '{4, 4, 4, 3, 4};
    longint seen [5][$];
    longint m, e;
    bit found;

    // Distinct partial products with addition only, x = 1.
    x = 1; op1 = 0; op2 = 0;
    for (int sv = 0; sv < 4; sv++) begin
      {s1, s2} = 2'(sv);
      #1;
      for (int f = 0; f < 5; f++) begin
        found = 0;
        foreach (seen[f][i]) if (seen[f][i] == longint'(q[f])) found = 1;
        if (!found) seen[f].push_back(longint'(q[f]));
      end
    end
    for (int f = 0; f < 5; f++) begin
      checks++;
      if (seen[f].size() !== expected_count[f]) begin
        failures++;
        $display("FAIL form %0d: %0d different outputs, expected %0d",
                 f, seen[f].size(), expected_count[f]);
      end
    end

    // Equations, random x, all controls.
    for (int it = 0; it < 100; it++) begin
      x = W'($urandom);
      for (int c = 0; c < 16; c++) begin
        {s1, op1, s2, op2} = 4'(c);
        #1;
        m = op1 ? longint'(x) - (s1 ? 8 : 4) * longint'(x)
                : longint'(x) + (s1 ? 8 : 4) * longint'(x);
        for (int f = 0; f < 5; f++) begin
          e = model(f, longint'(x), m, s2, op2);
          checks++;
          if (longint'(n1[f]) !== m || longint'(q[f]) !== e) begin
            failures++;
            $display("FAIL form %0d x=%0d ctl=%b: n1=%0d q=%0d exp %0d/%0d",
                     f, x, 4'(c), n1[f], q[f], m, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
