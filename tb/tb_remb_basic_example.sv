// tb_remb_basic_example: self-checking test of the single basic structure with all
// inputs from x. For every (s, add_sub) pair and random x the output must be
// 5x, -3x, 3x or -x as listed in its table.
module tb_remb_basic_example;

  localparam int unsigned W = 16;

  logic signed [W-1:0] x;
  logic                s, add_sub;
  logic signed [W+2:0] q;

  int checks = 0, failures = 0;

  remb_basic_example #(.W(W)) dut (.x, .s, .add_sub, .q);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int mult [4] = '{5, -3, 3, -1};   // index {s, add_sub}
    longint e;
    for (int it = 0; it < 200; it++) begin
      x = (it == 0) ? W'(1) : (it == 1) ? W'(-32768) : W'($urandom);
      for (int m = 0; m < 4; m++) begin
        {s, add_sub} = 2'(m);
        #1;
        e = longint'(x) * mult[m];
        checks++;
        if (longint'(q) !== e) begin
          failures++;
          $display("FAIL x=%0d s=%0d add_sub=%0d q=%0d exp=%0d", x, s, add_sub, q, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
