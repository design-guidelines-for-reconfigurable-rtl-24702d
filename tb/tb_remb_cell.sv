// tb_remb_cell: self-checking test of the two-input basic structure in its
// four cell types. Random a, b, c, s and add_sub are applied to one instance
// of each type and the result is compared with the cell table:
//   CELL_1 a+b / a+c, CELL_2 a-b / a-c, CELL_3 a+b / a-c, CELL_ADDSUB a+/-mux.
module tb_remb_cell;
  import remb_pkg::*;

  localparam int unsigned W = 16;

  logic signed [W-1:0] a, b, c;
  logic                s, add_sub;
  logic signed [W-1:0] q [4];

  int checks = 0, failures = 0;

  remb_cell #(.W(W), .CELL(CELL_ADDSUB)) dut0 (.a, .b, .c, .s, .add_sub, .q(q[0]));
  remb_cell #(.W(W), .CELL(CELL_1))      dut1 (.a, .b, .c, .s, .add_sub, .q(q[1]));
  remb_cell #(.W(W), .CELL(CELL_2))      dut2 (.a, .b, .c, .s, .add_sub, .q(q[2]));
  remb_cell #(.W(W), .CELL(CELL_3))      dut3 (.a, .b, .c, .s, .add_sub, .q(q[3]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] e [4];
    logic signed [W-1:0] m;
    for (int it = 0; it < 500; it++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      s = 1'($urandom); add_sub = 1'($urandom);
      #1;
      m    = s ? c : b;
      e[0] = add_sub ? a - m : a + m;
      e[1] = s ? a + c : a + b;
      e[2] = s ? a - c : a - b;
      e[3] = s ? a - c : a + b;
      for (int t = 0; t < 4; t++) begin
        checks++;
        if (q[t] !== e[t]) begin
          failures++;
          $display("FAIL cell %0d: s=%0d add_sub=%0d q=%0d exp=%0d",
                   t, s, add_sub, q[t], e[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
