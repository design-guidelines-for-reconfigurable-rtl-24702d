// tb_remb_dct_kernel_mult: self-checking test of the three-structure ReMB of
// the reconfigurable DCT kernel.
//  * x = 1 with select words 100, 111, 010 gives 39, 150 and 196.
//  * For random x and all 8 select words, p equals x times the constant
//    computed here from n1 = 16+{4,-1}, n2 = 2*n1+{-1,8*n1}, p = n2+{-4,0}.
module tb_remb_dct_kernel_mult;

  localparam int unsigned W = 16;

  logic signed [W-1:0] x;
  logic        [2:0]   sel;
  logic signed [W+8:0] p;

  int checks = 0, failures = 0;

  remb_dct_kernel_mult #(.W(W)) dut (.x, .sel, .p);

  function automatic longint constant_of(input logic [2:0] s);
    longint n1, n2;
    n1 = 16 + (s[0] ? -1 : 4);
    n2 = 2 * n1 + (s[1] ? 8 * n1 : -1);
    return n2 + (s[2] ? 0 : -4);
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
    x = 1;
    sel = 3'b100; expect_p(39,  "constant 39");
    sel = 3'b111; expect_p(150, "constant 150");
    sel = 3'b010; expect_p(196, "constant 196");
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      for (int it = 0; it < 100; it++) begin
        x = (it == 0) ? W'(-32768) : (it == 1) ? W'(32767) : W'($urandom);
        expect_p(longint'(x) * constant_of(3'(s)), "product");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
