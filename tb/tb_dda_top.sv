// tb_dda_top: end-to-end, self-checking testbench of the two-channel DDA
// processor at its default parameters (10-bit samples, N = 1024, M = 10,
// Q = 2, input alpha 1/4, index alpha 1/32).
//
// Samples of two synthetic signals are sent serially to both input ports
// (10 bit clocks per sample, frame marker on the MSB). A sample-level
// reference model written independently in this file (smoothing, minimum
// detection with outlier tolerance, period counting, pairing, windowed sum,
// equation (2) with limiter, index smoothing) predicts every window result.
// The testbench checks the raw index, the limiter/floor flags, the smoothed
// index and the word received from the serial output port, and checks that
// one index appears every N samples.
// Scenarios, one or more windows each: identical tones (limiter), nearby
// tones (mid-range index), tones an octave apart (period overwrite and index
// floor), noisy tones (outlier-tolerant detection), a chirp against a tone,
// and a run-time change of r and T_os. Each mechanism is counted and a
// mechanism that never occurred counts as a failure.
module tb_dda_top;
  import dda_pkg::*;

  localparam int N   = WIN_N;
  localparam int OW  = $clog2(N) + 1;
  localparam real FS = 1024.0;

  logic clk = 0, rst_n = 0, sfrm = 0, sdi1 = 0, sdi2 = 0;
  logic [R_W-1:0]   r_sel = 4;
  logic [TOS_W-1:0] tos = 6;
  logic sdo, so_frm, tp_min1, tp_min2, tp_pair, tp_idx_valid;
  logic tp_limited, tp_floored, tp_overwrite;
  logic [OW-1:0] tp_idx, tp_idx_smooth;

  int checks = 0, failures = 0;

  dda_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ reference model
  typedef struct {
    int  sm;          // smoothed sample
    int  prev;
    bit  primed;
    bit  hist[HIST_M-1];
    int  cnt;
    bit  armed;
  } chan_t;

  chan_t ch[2];
  bit    lat_v[2];
  int    lat_t[2];
  int    acc, wtick, msm;
  int    exp_idx[$], exp_flag[$], exp_sm[$];
  // mechanism counters (model side)
  int    n_min[2], n_pairs, n_over, n_outlier_min, n_lim, n_floor, n_mid;

  function automatic int floordiv(int v, int s);
    int d = 1 << s;
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  function automatic bit chan_step(int c, int x, output int period, output bit pv);
    bit d[HIST_M];
    int up = 0, dn = 0, wrong = 0;
    bit f = 0;
    pv = 0; period = 0;
    ch[c].sm = ch[c].sm - floordiv(ch[c].sm, IN_SHIFT) + floordiv(x, IN_SHIFT);
    if (!ch[c].primed) begin
      ch[c].primed = 1;
      ch[c].prev = ch[c].sm;
    end else begin
      d[0] = (ch[c].sm >= ch[c].prev);
      for (int i = 1; i < HIST_M; i++) d[i] = ch[c].hist[i-1];
      for (int i = 0; i < HIST_M/2; i++) if (d[i]) up++;
      for (int i = HIST_M/2; i < HIST_M; i++) if (!d[i]) dn++;
      f = d[HIST_M/2-1] && !d[HIST_M/2] && up >= HIST_M/2 - OUTLIER_Q && dn >= HIST_M/2 - OUTLIER_Q;
      for (int i = 0; i < HIST_M-1; i++) ch[c].hist[i] = f ? 1'b1 : d[i];
      ch[c].prev = ch[c].sm;
      if (f && (up < HIST_M/2 || dn < HIST_M/2)) n_outlier_min++;
    end
    if (f) begin
      n_min[c]++;
      if (ch[c].armed) begin
        pv = 1;
        period = (ch[c].cnt + 1 > (1 << CNT_W) - 1) ? (1 << CNT_W) - 1 : ch[c].cnt + 1;
      end
      ch[c].armed = 1;
      ch[c].cnt = 0;
    end else if (ch[c].cnt < (1 << CNT_W) - 1) begin
      ch[c].cnt++;
    end
    return f;
  endfunction

  task automatic model_sample(int x1, int x2);
    int  p[2];
    bit  pv[2];
    bit  f;
    int  sum, rr, cap, idx, flag;
    for (int c = 0; c < 2; c++) f = chan_step(c, c == 0 ? x1 : x2, p[c], pv[c]);
    for (int c = 0; c < 2; c++) if (pv[c]) begin
      if (lat_v[c]) n_over++;
      lat_v[c] = 1; lat_t[c] = p[c];
    end
    if (lat_v[0] && lat_v[1]) begin
      acc += (lat_t[0] > lat_t[1]) ? lat_t[0] - lat_t[1] : lat_t[1] - lat_t[0];
      if (acc > 65535) acc = 65535;
      lat_v[0] = 0; lat_v[1] = 0;
      n_pairs++;
    end
    wtick++;
    if (wtick == N) begin
      sum = acc;
      rr  = (int'(r_sel) > $clog2(N)) ? $clog2(N) : int'(r_sel);
      cap = N >> rr;
      if (sum < int'(tos)) begin idx = N; flag = 1; n_lim++; end
      else if (sum - int'(tos) >= cap) begin idx = 0; flag = 2; n_floor++; end
      else begin idx = N - ((sum - int'(tos)) << rr); flag = 0; n_mid++; end
      msm = msm - floordiv(msm, OUT_SHIFT) + floordiv(idx, OUT_SHIFT);
      exp_idx.push_back(idx);
      exp_flag.push_back(flag);
      exp_sm.push_back(msm);
      acc = 0; wtick = 0;
    end
  endtask

  // ------------------------------------------------------------ DUT side
  int dut_min[2], dut_pairs, dut_over, n_windows, n_serial, n_smooth_diff;
  int last_sm_seen;
  longint last_idx_clk, clk_count;
  int     pause_clks = 0;   // clocks the sample stream was held in this window

  always @(posedge clk) begin
    clk_count <= clk_count + 1;
    if (rst_n) begin
      if (tp_min1) dut_min[0]++;
      if (tp_min2) dut_min[1]++;
      if (tp_pair) dut_pairs++;
      if (tp_overwrite) dut_over++;
    end
  end

  // window results: compare with the model (checked a clock later, when the
  // smoothed index has been registered as well)
  always @(posedge clk) begin
    if (rst_n && tp_idx_valid) begin
      int e, ef, es;
      @(negedge clk);
      checks++;
      if (exp_idx.size() == 0) begin
        failures++;
        $display("FAIL index without model window");
      end else begin
        e = exp_idx.pop_front(); ef = exp_flag.pop_front(); es = exp_sm.pop_front();
        if (int'(tp_idx) != e || tp_limited != (ef == 1) || tp_floored != (ef == 2)) begin
          failures++;
          $display("FAIL window %0d idx %0d exp %0d lim %b floor %b exp flag %0d",
                   n_windows, tp_idx, e, tp_limited, tp_floored, ef);
        end
        checks++;
        if (int'(tp_idx_smooth) != es) begin
          failures++;
          $display("FAIL window %0d smoothed %0d exp %0d", n_windows, tp_idx_smooth, es);
        end
        if (es != e) n_smooth_diff++;
        last_sm_seen = es;
        $display("window %0d: r=%0d tos=%0d idx=%0d smoothed=%0d", n_windows, r_sel, tos, tp_idx, tp_idx_smooth);
      end
      // one index per N samples of SAMPLE_W bit clocks each
      if (n_windows > 0) begin
        checks++;
        if (clk_count - last_idx_clk != longint'(N * SAMPLE_W + pause_clks)) begin
          failures++;
          $display("FAIL index period %0d clocks", clk_count - last_idx_clk);
        end
      end
      last_idx_clk = clk_count;
      pause_clks = 0;
      n_windows++;
    end
  end

  // serial output receiver
  initial begin
    logic [OW-1:0] w;
    forever begin
      @(posedge clk);
      if (rst_n && so_frm) begin
        w = '0;
        for (int b = 0; b < OW; b++) begin
          if (b > 0) @(posedge clk);
          w = {w[OW-2:0], sdo};
        end
        checks++;
        if (int'(w) != last_sm_seen) begin
          failures++;
          $display("FAIL serial word %0d, smoothed index %0d", w, last_sm_seen);
        end
        n_serial++;
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  task automatic send_sample(int x1, int x2);
    logic [SAMPLE_W-1:0] a, b;
    a = SAMPLE_W'(x1); b = SAMPLE_W'(x2);
    model_sample(x1, x2);
    for (int i = SAMPLE_W - 1; i >= 0; i--) begin
      @(negedge clk);
      sfrm = (i == SAMPLE_W - 1);
      sdi1 = a[i];
      sdi2 = b[i];
    end
  endtask

  function automatic int clip(real v);
    int lim = (1 << (SAMPLE_W - 1)) - 1;
    int iv = int'(v);
    return iv > lim ? lim : (iv < -lim - 1 ? -lim - 1 : iv);
  endfunction

  function automatic real noise(int amp);
    return real'($urandom_range(0, 2 * amp)) - real'(amp);
  endfunction

  real ph1 = 0.0, ph2 = 0.0;
  localparam real TWO_PI = 6.283185307179586;

  // run `windows` windows with tone f1 on s1 and f2 (or a chirp f2 -> f2e)
  task automatic run(real f1, real f2, real f2e, int windows, int namp);
    int total = windows * N;
    for (int k = 0; k < total; k++) begin
      automatic real f2k = f2 + (f2e - f2) * real'(k) / real'(total);
      ph1 += TWO_PI * f1 / FS;
      ph2 += TWO_PI * f2k / FS;
      send_sample(clip(400.0 * $sin(ph1) + noise(namp)), clip(400.0 * $sin(ph2) + noise(namp)));
    end
  endtask

  initial begin
    for (int c = 0; c < 2; c++) begin
      ch[c].sm = 0; ch[c].prev = 0; ch[c].primed = 0; ch[c].cnt = 0; ch[c].armed = 0;
      for (int i = 0; i < HIST_M - 1; i++) ch[c].hist[i] = 1;
      lat_v[c] = 0; lat_t[c] = 0; n_min[c] = 0; dut_min[c] = 0;
    end
    acc = 0; wtick = 0; msm = 0;
    n_pairs = 0; n_over = 0; n_outlier_min = 0; n_lim = 0; n_floor = 0; n_mid = 0;
    dut_pairs = 0; dut_over = 0; n_windows = 0; n_serial = 0; n_smooth_diff = 0;
    last_sm_seen = 0; clk_count = 0; last_idx_clk = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(20.0, 20.0, 20.0, 2, 0);     // identical tones: sum < T_os, limiter
    run(20.0, 21.0, 21.0, 1, 0);     // nearby tones: mid-range index
    run(20.0, 40.0, 40.0, 1, 0);     // octave apart: overwrites, index floor
    run(25.0, 25.0, 25.0, 1, 80);    // noisy, equal tones: outlier tolerance
    run(20.0, 10.0, 30.0, 3, 2);     // chirp 10 -> 30 Hz against 20 Hz
    repeat (3 * SAMPLE_W) @(negedge clk);   // let the last window close
    pause_clks = 3 * SAMPLE_W;
    r_sel = 2; tos = 0;              // run-time setting change
    run(25.0, 30.0, 30.0, 1, 0);
    run(25.0, 26.0, 26.0, 1, 0);
    repeat (40) @(negedge clk);
    sfrm = 0;
    repeat (4 * SAMPLE_W) @(negedge clk);

    // cross-checks of model and DUT event counts, and coverage
    checks++;
    if (dut_min[0] != n_min[0] || dut_min[1] != n_min[1] || dut_pairs != n_pairs || dut_over != n_over) begin
      failures++;
      $display("FAIL counts: minima %0d/%0d vs %0d/%0d pairs %0d vs %0d overwrites %0d vs %0d",
               dut_min[0], dut_min[1], n_min[0], n_min[1], dut_pairs, n_pairs, dut_over, n_over);
    end
    checks++;
    if (exp_idx.size() != 0 || n_windows != 10) begin
      failures++;
      $display("FAIL windows %0d, %0d unmatched", n_windows, exp_idx.size());
    end
    $display("mechanisms: minima %0d/%0d outlier-tolerant %0d pairs %0d overwrites %0d",
             n_min[0], n_min[1], n_outlier_min, n_pairs, n_over);
    $display("mechanisms: limiter %0d floor %0d mid-range %0d smoothing-active %0d serial words %0d",
             n_lim, n_floor, n_mid, n_smooth_diff, n_serial);
    foreach (n_min[c]) begin checks++; if (n_min[c] == 0) failures++; end
    checks++; if (n_outlier_min == 0) begin failures++; $display("FAIL no outlier-tolerant minimum"); end
    checks++; if (n_pairs == 0)       begin failures++; $display("FAIL no pair"); end
    checks++; if (n_over == 0)        begin failures++; $display("FAIL no overwrite"); end
    checks++; if (n_lim == 0)         begin failures++; $display("FAIL limiter never engaged"); end
    checks++; if (n_floor == 0)       begin failures++; $display("FAIL floor never reached"); end
    checks++; if (n_mid == 0)         begin failures++; $display("FAIL no mid-range index"); end
    checks++; if (n_smooth_diff == 0) begin failures++; $display("FAIL smoothing never visible"); end
    checks++; if (n_serial != n_windows) begin failures++; $display("FAIL %0d serial words", n_serial); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
