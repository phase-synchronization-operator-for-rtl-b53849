// dda_tone_run: testbench helper that runs the 25 Hz / 30 Hz two-tone
// experiment on one dda_top built with the given parameters.
//
// It streams `WINDOWS` windows of two sines (amplitude 3/4 of full scale at
// SAMPLE_W bits, 1024 samples/s) into the processor with r = 0 and T_os = 0
// and checks every window after the first: K = 25 period pairs (24..26 for
// window edges) and a raw index within 40 of 853, the value the interval
// arithmetic gives (1024 - 25 * |1024/25 - 1024/30|). It also checks that
// the smoothed index rises monotonically from 0 toward the raw index and,
// at the end, equals y(k) = y - floor(y/2^S) + floor(idx/2^S) applied to the
// observed raw indices. Results are returned on `checks`/`failures` when
// `done` rises.
module dda_tone_run #(
  parameter int unsigned SAMPLE_W  = 10,
  parameter int unsigned M         = 10,
  parameter int unsigned Q         = 2,
  parameter int unsigned OUT_SHIFT = 5,
  parameter int unsigned WINDOWS   = 12
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N  = 1024;
  localparam int OW = $clog2(N) + 1;
  localparam real TWO_PI = 6.283185307179586;

  logic rst_n = 0, sfrm = 0, sdi1 = 0, sdi2 = 0;
  logic [3:0] r_sel = 0;
  logic [7:0] tos = 0;
  logic sdo, so_frm, tp_min1, tp_min2, tp_pair, tp_idx_valid, tp_limited, tp_floored, tp_overwrite;
  logic [OW-1:0] tp_idx, tp_idx_smooth;

  dda_top #(.SAMPLE_W(SAMPLE_W), .M(M), .Q(Q), .OUT_SHIFT(OUT_SHIFT)) dut (.*);

  int pairs = 0, nwin = 0, model_sm = 0, prev_sm = 0;

  function automatic int fdiv(int v, int s);
    return (v >= 0) ? v >> s : -((-v + (1 << s) - 1) >> s);
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0;
  end

  always @(posedge clk) begin
    if (rst_n && tp_pair) pairs <= pairs + 1;
    if (rst_n && tp_idx_valid) begin
      automatic int p = pairs + (tp_pair ? 1 : 0);
      pairs <= 0;
      model_sm = model_sm - fdiv(model_sm, OUT_SHIFT) + fdiv(int'(tp_idx), OUT_SHIFT);
      if (nwin > 0) begin
        checks++;
        if (p < 24 || p > 26 || int'(tp_idx) < 853 - 40 || int'(tp_idx) > 853 + 40) begin
          failures++;
          $display("FAIL SAMPLE_W=%0d M=%0d Q=%0d window %0d: %0d pairs, index %0d",
                   SAMPLE_W, M, Q, nwin, p, tp_idx);
        end
      end
      nwin++;
    end
  end

  // the smoothed index is registered on the edge that closes the window
  logic iv_d = 0;
  always @(posedge clk) iv_d <= rst_n && tp_idx_valid;

  always @(negedge clk) begin
    if (iv_d) begin
      checks++;
      if (int'(tp_idx_smooth) != model_sm || int'(tp_idx_smooth) < prev_sm) begin
        failures++;
        $display("FAIL SAMPLE_W=%0d smoothed %0d, expected %0d (previous %0d)",
                 SAMPLE_W, tp_idx_smooth, model_sm, prev_sm);
      end
      prev_sm = int'(tp_idx_smooth);
    end
  end

  initial begin
    real ph1 = 0.0, ph2 = 0.0, amp;
    logic [SAMPLE_W-1:0] a, b;
    amp = 0.75 * real'((1 << (SAMPLE_W - 1)) - 1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < WINDOWS * N; k++) begin
      ph1 += TWO_PI * 25.0 / 1024.0;
      ph2 += TWO_PI * 30.0 / 1024.0;
      a = SAMPLE_W'(int'(amp * $sin(ph1)));
      b = SAMPLE_W'(int'(amp * $sin(ph2)));
      for (int i = SAMPLE_W - 1; i >= 0; i--) begin
        @(negedge clk);
        sfrm = (i == SAMPLE_W - 1);
        sdi1 = a[i];
        sdi2 = b[i];
      end
    end
    repeat (4 * SAMPLE_W) @(negedge clk);
    checks++;
    if (nwin != WINDOWS) begin
      failures++;
      $display("FAIL SAMPLE_W=%0d: %0d windows", SAMPLE_W, nwin);
    end
    $display("config SAMPLE_W=%0d M=%0d Q=%0d alpha=1/%0d: %0d windows, last index %0d, smoothed %0d",
             SAMPLE_W, M, Q, 1 << OUT_SHIFT, nwin, tp_idx, tp_idx_smooth);
    done = 1;
  end
endmodule
