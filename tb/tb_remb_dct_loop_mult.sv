// tb_remb_dct_loop_mult: self-checking test of the four-structure ReMB of
// the DCT loop.
//  * x = 1 with the select words of the coefficient table gives 473 and 392.
//  * For random x and all 16 select words, p equals x times the constant
//    computed here from the node equations
//    n1 = 1+{4,8}, n2 = 2*n1+{1,n1}, n3 = 1+{n1,-8}, p = 32*n2+{8*n1,n3}.
//  * The set of constants the block can form is exactly
//    {345,358,392,473,486,520,601,618,680,857,874,936}; in particular 362
//    is not among them.
module tb_remb_dct_loop_mult;
  import remb_pkg::*;

  localparam int unsigned W = 16;

  logic signed [W-1:0]  x;
  loop_sel_t            sel;
  logic signed [W+10:0] p;

  int checks = 0, failures = 0;

  remb_dct_loop_mult #(.W(W)) dut (.x, .sel, .p);

  function automatic longint constant_of(input logic [3:0] s);
    longint n1, n2, n3;
    n1 = 1 + (s[0] ? 8 : 4);
    n2 = 2 * n1 + (s[1] ? n1 : 1);
    n3 = 1 + (s[2] ? -8 : n1);
    return 32 * n2 + (s[3] ? n3 : 8 * n1);
  endfunction

  task automatic expect_p(input longint e, input string what);
    #1;
    checks++;
    if (longint'(p) !== e) begin
      failures++;
      $display("FAIL %s: x=%0d sel=%b p=%0d exp=%0d", what, x, sel, p, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint formed [16];
    automatic longint expected_set [12] = '{345, 358, 392, 473, 486, 520, 601, 618, 680, 857, 874, 936};
    bit hit;

    x = 1;
    sel = dct_coef(3'd1).sel; expect_p(473, "coefficient k=1");
    sel = dct_coef(3'd3).sel; expect_p(392, "coefficient k=3");

    for (int s = 0; s < 16; s++) begin
      sel = loop_sel_t'(s);
      x = 1;
      #1;
      formed[s] = longint'(p);
      for (int it = 0; it < 50; it++) begin
        x = (it == 0) ? W'(-32768) : (it == 1) ? W'(32767) : W'($urandom);
        expect_p(longint'(x) * constant_of(4'(s)), "product");
      end
    end

    // Every formed constant lies in the expected set and vice versa.
    foreach (formed[s]) begin
      hit = 0;
      foreach (expected_set[i]) if (formed[s] == expected_set[i]) hit = 1;
      checks++;
      if (!hit || formed[s] == 362) begin
        failures++;
        $display("FAIL select %0d forms unexpected constant %0d", s, formed[s]);
      end
    end
    foreach (expected_set[i]) begin
      hit = 0;
      foreach (formed[s]) if (formed[s] == expected_set[i]) hit = 1;
      checks++;
      if (!hit) begin
        failures++;
        $display("FAIL constant %0d never formed", expected_set[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
