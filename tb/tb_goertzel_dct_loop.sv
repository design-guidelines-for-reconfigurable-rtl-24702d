// tb_goertzel_dct_loop: self-checking test of the time-multiplexed Goertzel
// DCT loop.
//
// Random 12-bit samples are fed over several frames, with idle gaps and with
// samples offered while the loop is busy (held until taken). For every taken
// sample the integer reference model of dct_ref_pkg gives the eight bin
// outputs, which must appear in bin order on the eight cycles after the
// sample is taken. The testbench also checks
//   * the rate: with a sample always offered, samples are taken every 8
//     cycles;
//   * out_last on the last sample of each frame and out_coef_missing on
//     bins 2 and 6 only;
//   * at each frame end, bins 0,1,3,4,5,7 against a floating-point Goertzel
//     recursion with the exact coefficients 2cos(k*pi/8).
module tb_goertzel_dct_loop;
  import dct_ref_pkg::*;

  localparam int unsigned W_IN    = 12;
  localparam int unsigned SW      = W_IN + 8;
  localparam int unsigned FRAME_N = 8;
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

  goertzel_dct_loop #(.W_IN(W_IN), .SW(SW), .FRAME_N(FRAME_N)) dut (.*);

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
