// tb_remb_top: end-to-end test of remb_top at its default parameters.
//
// The DCT loop is driven over four frames of random 12-bit samples, half of
// them offered back to back (so the loop stalls the source) and half with
// idle gaps; every bin output is compared, value and cycle, with the
// integer reference model, and frame results of the bins with a coefficient
// are compared with a floating-point Goertzel recursion. The kernel ReMB,
// the single basic structure and the cascade are then driven with random x
// over their select settings. The testbench counts how often each
// mechanism happened (stall, back-to-back samples, frame restart, k=0 shift
// bypass, k=4 zero, negated products, missing-coefficient flag, each kernel
// constant, each basic-structure mode, the cascade's hybrid input) and
// counts a failure for any that never did.
module tb_remb_top;
  import dct_ref_pkg::*;

  localparam int unsigned W_IN    = 12;
  localparam int unsigned SW      = W_IN + 8;
  localparam int unsigned FRAME_N = 8;
  localparam int unsigned W       = 16;
  localparam int          FRAMES  = 4;
  localparam real         TOL     = 48.0;

  logic                   clk = 0, rst_n = 0;
  logic                   in_valid = 0, in_ready;
  logic signed [W_IN-1:0] in_sample = '0;
  logic                   out_valid, out_last, out_coef_missing;
  logic [2:0]             out_k;
  logic signed [SW-1:0]   out_y;

  int checks = 0, failures = 0;
  int stalls = 0, back_to_back = 0, frames_done = 0;

  // Side-by-side multiplier blocks.
  logic signed [W-1:0] kern_x = '0, bs_x = '0, cas_x = '0;
  logic [2:0]          kern_sel = '0;
  logic signed [W+8:0] kern_p;
  logic                bs_s = 0, bs_add_sub = 0;
  logic signed [W+2:0] bs_q;
  logic                cas_s1 = 0, cas_add_sub1 = 0, cas_s2 = 0, cas_add_sub2 = 0;
  logic signed [W+9:0] cas_n1, cas_q;

  // Mechanism counters.
  int n_bypass_two = 0, n_zero = 0, n_negated = 0, n_missing = 0;
  int n_kern [3] = '{0, 0, 0};
  int n_bs_mode [4] = '{0, 0, 0, 0};
  int n_cas_hybrid = 0;

  remb_top dut (
    .clk, .rst_n,
    .dct_in_valid (in_valid),  .dct_in_ready (in_ready), .dct_in_sample (in_sample),
    .dct_out_valid (out_valid), .dct_out_k (out_k), .dct_out_y (out_y),
    .dct_out_last (out_last),  .dct_out_coef_missing (out_coef_missing),
    .kern_x, .kern_sel, .kern_p,
    .bs_x, .bs_s, .bs_add_sub, .bs_q,
    .cas_x, .cas_s1, .cas_add_sub1, .cas_s2, .cas_add_sub2, .cas_n1, .cas_q
  );

  always #5 clk = ~clk;

  // Expected outputs.
  typedef struct {
    int     k;
    longint y;
    bit     last;
    longint cycle;
    real    yr;
  } exp_t;
  exp_t exp_q [$];

  longint w1 [8], w2 [8];
  real    r1 [8], r2 [8];
  int     sample_in_frame = 0;
  longint cycle = 0, last_accept = -100;
  bit     offered_since_accept = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // Handshake state seen at the falling edge before each rising edge.
  logic                   hs_valid = 0, hs_ready = 0;
  logic signed [W_IN-1:0] hs_sample = '0;
  always @(negedge clk) begin
    hs_valid  <= in_valid;
    hs_ready  <= in_ready;
    hs_sample <= in_sample;
  end

  // Model update on every sample taken.
  always @(posedge clk) begin
    if (rst_n && hs_valid && !hs_ready) stalls++;
    if (rst_n && hs_valid && hs_ready) begin
      longint y;
      real yr;
      if (offered_since_accept && last_accept >= 0) begin
        back_to_back++;
        checks++;
        if (cycle - last_accept !== 8) begin
          failures++;
          $display("FAIL rate: samples taken %0d cycles apart", cycle - last_accept);
        end
      end
      if (sample_in_frame == 0)
        for (int k = 0; k < 8; k++) begin w1[k] = 0; w2[k] = 0; r1[k] = 0.0; r2[k] = 0.0; end
      for (int k = 0; k < 8; k++) begin
        longint a1, a2;
        real    b1, b2;
        a1 = w1[k]; a2 = w2[k]; b1 = r1[k]; b2 = r2[k];
        bin_step(k, longint'(hs_sample), a1, a2, y);
        real_step(k, real'(hs_sample), b1, b2, yr);
        w1[k] = a1; w2[k] = a2; r1[k] = b1; r2[k] = b2;
        exp_q.push_back('{k: k, y: y, last: (sample_in_frame == FRAME_N - 1),
                          cycle: cycle + 2 + longint'(k), yr: yr});
      end
      sample_in_frame = (sample_in_frame == FRAME_N - 1) ? 0 : sample_in_frame + 1;
      last_accept = cycle;
    end
  end

  // Output comparison.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output bin %0d", out_k);
      end else begin
        e = exp_q.pop_front();
        if (e.k == 0) n_bypass_two++;
        if (e.k == 4) n_zero++;
        if (e.k >= 5) n_negated++;
        if (out_coef_missing) n_missing++;
        if (int'(out_k) !== e.k || longint'(out_y) !== e.y || out_last !== e.last ||
            cycle !== e.cycle || out_coef_missing !== (e.k == 2 || e.k == 6)) begin
          failures++;
          $display("FAIL cycle %0d: bin %0d y=%0d last=%0d miss=%0d, expected bin %0d y=%0d last=%0d at cycle %0d",
                   cycle, out_k, out_y, out_last, out_coef_missing, e.k, e.y, e.last, e.cycle);
        end
        if (e.last && e.k !== 2 && e.k !== 6) begin
          real d;
          d = real'(out_y) - e.yr;
          if (d < 0) d = -d;
          checks++;
          if (d > TOL) begin
            failures++;
            $display("FAIL frame result bin %0d: %0d vs exact %f", e.k, out_y, e.yr);
          end
        end
        if (e.last && e.k == 7) frames_done++;
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_mech(input string name, input int count);
    checks++;
    $display("mechanism %-26s %0d", name, count);
    if (count <= 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end
  endtask

  task automatic side_check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // The combinational multiplier blocks beside the loop.
  task automatic side_checks();
    int     kern_const [3] = '{39, 150, 196};
    logic [2:0] kern_word [3] = '{3'b100, 3'b111, 3'b010};
    int     bs_const [4] = '{5, -3, 3, -1};
    longint n1, e;
    for (int it = 0; it < 50; it++) begin
      kern_x = W'($urandom); bs_x = W'($urandom); cas_x = W'($urandom);
      for (int c = 0; c < 3; c++) begin
        kern_sel = kern_word[c];
        #1;
        side_check(longint'(kern_p) === longint'(kern_x) * kern_const[c], "kernel product");
        n_kern[c]++;
      end
      for (int m = 0; m < 4; m++) begin
        {bs_s, bs_add_sub} = 2'(m);
        #1;
        side_check(longint'(bs_q) === longint'(bs_x) * bs_const[m], "basic structure product");
        n_bs_mode[m]++;
      end
      for (int c = 0; c < 4; c++) begin
        {cas_s1, cas_s2} = 2'(c);
        cas_add_sub1 = 0; cas_add_sub2 = 0;
        #1;
        // Hybrid form: n1 = x + {4x, 8x}; q = 2*n1 + {x, 4*n1}.
        n1 = longint'(cas_x) * (cas_s1 ? 9 : 5);
        e  = 2 * n1 + (cas_s2 ? 4 * n1 : longint'(cas_x));
        side_check(longint'(cas_n1) === n1 && longint'(cas_q) === e, "cascade product");
        if (cas_s2) n_cas_hybrid++;
      end
    end
  endtask

  // Offer one sample from a falling edge until it is taken. in_ready only
  // changes on rising edges, so at a falling edge it tells whether the next
  // rising edge takes the sample.
  task automatic send(input logic signed [W_IN-1:0] v);
    in_valid  = 1;
    in_sample = v;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (n = 0; n < FRAMES * FRAME_N; n++) begin
      // Frames 0 and 2: a sample always offered; frames 1 and 3: idle gaps.
      offered_since_accept = ((n / FRAME_N) % 2 == 0);
      if (!offered_since_accept) repeat ($urandom_range(0, 12)) @(negedge clk);
      send((n == 0) ? W_IN'(2047) : (n == 1) ? W_IN'(-2048) : W_IN'($urandom));
    end
    repeat (20) @(negedge clk);
    side_checks();
    check_mech("stall", stalls);
    check_mech("back-to-back samples", back_to_back);
    check_mech("frame restart", frames_done - 1);
    check_mech("k=0 shift bypass", n_bypass_two);
    check_mech("k=4 zero coefficient", n_zero);
    check_mech("negated product k=5..7", n_negated);
    check_mech("missing coefficient flag", n_missing);
    check_mech("kernel constant 39", n_kern[0]);
    check_mech("kernel constant 150", n_kern[1]);
    check_mech("kernel constant 196", n_kern[2]);
    for (int m = 0; m < 4; m++) check_mech("basic structure mode", n_bs_mode[m]);
    check_mech("cascade hybrid input", n_cas_hybrid);
    checks++;
    if (exp_q.size() !== 0 || frames_done !== FRAMES) begin
      failures++;
      $display("FAIL %0d outputs missing, %0d frames done", exp_q.size(), frames_done);
    end
    checks++;
    if (stalls == 0 || back_to_back == 0) begin
      failures++;
      $display("FAIL stalls=%0d back_to_back=%0d", stalls, back_to_back);
    end
    $display("stalls=%0d back_to_back=%0d frames=%0d", stalls, back_to_back, frames_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
