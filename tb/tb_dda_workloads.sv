// tb_dda_workloads: the two synthetic experiments used to characterise the
// DDA processor, run on the full-size design (N = 1024, 1024 samples/s).
//
// 1. Selectivity sweep: s1 is a 20 Hz sine, s2 a chirp sweeping slowly from
//    10 to 30 Hz (0.5 Hz per one-second window). Four processors share the
//    inputs: r = 2, 4, 6 with T_os = 6 and r = 4 with T_os = 0. Checked:
//    the index peaks near 20 Hz, is near zero far from it, the band of
//    non-zero indices narrows as r grows, and the offset raises the peak.
// 2. Two tones at 25 and 30 Hz, 100 000 samples each (about 97 windows), with
//    r = 0 and T_os = 0. Each window must hold K = floor(N * 25 / 1024) = 25
//    pairs (give or take one for window edges), and the raw index must sit
//    near N - K * |1024/25 - 1024/30| = 1024 - 171 = 853, the value the
//    interval arithmetic gives, in every window after the first.
module tb_dda_workloads;
  import dda_pkg::*;

  localparam int N   = WIN_N;
  localparam int OW  = $clog2(N) + 1;
  localparam int NI  = 4;
  localparam real FS = 1024.0;
  localparam real TWO_PI = 6.283185307179586;

  logic clk = 0, rst_n = 0, sfrm = 0, sdi1 = 0, sdi2 = 0;
  logic [R_W-1:0]   r_sel [NI];
  logic [TOS_W-1:0] tos   [NI];
  logic             sdo [NI], so_frm [NI], tp_min1 [NI], tp_min2 [NI], tp_pair [NI];
  logic             tp_idx_valid [NI], tp_limited [NI], tp_floored [NI], tp_overwrite [NI];
  logic [OW-1:0]    tp_idx [NI], tp_idx_smooth [NI];

  int checks = 0, failures = 0;

  for (genvar g = 0; g < NI; g++) begin : g_dut
    dda_top dut (
      .clk, .rst_n, .sfrm, .sdi1, .sdi2, .r_sel(r_sel[g]), .tos(tos[g]),
      .sdo(sdo[g]), .so_frm(so_frm[g]), .tp_min1(tp_min1[g]), .tp_min2(tp_min2[g]),
      .tp_pair(tp_pair[g]), .tp_idx(tp_idx[g]), .tp_idx_valid(tp_idx_valid[g]),
      .tp_idx_smooth(tp_idx_smooth[g]), .tp_limited(tp_limited[g]),
      .tp_floored(tp_floored[g]), .tp_overwrite(tp_overwrite[g]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-window record of instance 0..NI-1
  int idx_log [NI][$];
  int pairs_in_win = 0, pair_log[$];

  always @(posedge clk) begin
    if (rst_n && tp_pair[0]) pairs_in_win++;
    for (int g = 0; g < NI; g++)
      if (rst_n && tp_idx_valid[g]) idx_log[g].push_back(int'(tp_idx[g]));
    if (rst_n && tp_idx_valid[0]) begin
      pair_log.push_back(pairs_in_win + (tp_pair[0] ? 1 : 0));
      pairs_in_win = 0;
    end
  end

  task automatic send_sample(int x1, int x2);
    logic [SAMPLE_W-1:0] a, b;
    a = SAMPLE_W'(x1); b = SAMPLE_W'(x2);
    for (int i = SAMPLE_W - 1; i >= 0; i--) begin
      @(negedge clk);
      sfrm = (i == SAMPLE_W - 1);
      sdi1 = a[i];
      sdi2 = b[i];
    end
  endtask

  task automatic reset_all();
    @(negedge clk);
    rst_n = 0;
    foreach (idx_log[g]) idx_log[g].delete();
    pair_log.delete();
    pairs_in_win = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
  endtask

  real ph1, ph2;

  initial begin
    int nz [NI];
    int peak [NI], peak_w [NI];
    int wins;
    real fc;
    r_sel[0] = 2; tos[0] = 6;
    r_sel[1] = 4; tos[1] = 6;
    r_sel[2] = 6; tos[2] = 6;
    r_sel[3] = 4; tos[3] = 0;

    // ------------------------------------------------ 1. selectivity sweep
    reset_all();
    wins = 40;
    ph1 = 0.0; ph2 = 0.0;
    for (int k = 0; k < wins * N; k++) begin
      automatic real f2 = 10.0 + 20.0 * real'(k) / real'(wins * N);
      ph1 += TWO_PI * 20.0 / FS;
      ph2 += TWO_PI * f2 / FS;
      send_sample(int'(400.0 * $sin(ph1)), int'(400.0 * $sin(ph2)));
    end
    repeat (4 * SAMPLE_W) @(negedge clk);
    for (int g = 0; g < NI; g++) begin
      nz[g] = 0; peak[g] = -1; peak_w[g] = 0;
      for (int w = 1; w < idx_log[g].size(); w++) begin
        if (idx_log[g][w] > 0) nz[g]++;
        if (idx_log[g][w] > peak[g]) begin peak[g] = idx_log[g][w]; peak_w[g] = w; end
      end
    end
    for (int w = 0; w < wins; w++)
      $display("sweep window %2d  f2 %5.2f Hz  idx r2 %4d  r4 %4d  r6 %4d  r4/Tos0 %4d", w,
               10.0 + 20.0 * (real'(w) + 0.5) / real'(wins),
               idx_log[0][w], idx_log[1][w], idx_log[2][w], idx_log[3][w]);
    checks++;
    if (idx_log[0].size() != wins) begin
      failures++; $display("FAIL %0d windows", idx_log[0].size());
    end
    for (int g = 0; g < NI; g++) begin
      fc = 10.0 + 20.0 * (real'(peak_w[g]) + 0.5) / real'(wins);
      checks++;
      if (fc < 18.0 || fc > 22.0) begin
        failures++; $display("FAIL instance %0d peaks at %f Hz", g, fc);
      end
    end
    // far from the tone (below 14 Hz, above 26 Hz) the r = 4 and 6 indices vanish
    for (int w = 1; w < wins; w++) begin
      fc = 10.0 + 20.0 * (real'(w) + 0.5) / real'(wins);
      if (fc < 14.0 || fc > 26.0) begin
        checks++;
        if (idx_log[1][w] > N / 8 || idx_log[2][w] > N / 8) begin
          failures++; $display("FAIL window %0d (%f Hz) not rejected", w, fc);
        end
      end
    end
    checks++;
    if (!(nz[0] >= nz[1] && nz[1] >= nz[2] && nz[0] > nz[2])) begin
      failures++; $display("FAIL band does not narrow with r: %0d %0d %0d", nz[0], nz[1], nz[2]);
    end
    checks++;
    if (peak[1] < peak[3]) begin
      failures++; $display("FAIL offset lowers the peak: %0d < %0d", peak[1], peak[3]);
    end
    checks++;
    if (peak[1] < N / 2) begin
      failures++; $display("FAIL peak with r=4, Tos=6 only %0d", peak[1]);
    end
    $display("band widths (windows > 0): r2 %0d r4 %0d r6 %0d; peaks %0d %0d %0d, r4/Tos0 %0d",
             nz[0], nz[1], nz[2], peak[0], peak[1], peak[2], peak[3]);

    // ---------------------------------------------- 2. tones 25 Hz / 30 Hz
    for (int g = 0; g < NI; g++) begin r_sel[g] = 0; tos[g] = 0; end
    reset_all();
    ph1 = 0.0; ph2 = 0.0;
    for (int k = 0; k < 100_000; k++) begin
      ph1 += TWO_PI * 25.0 / FS;
      ph2 += TWO_PI * 30.0 / FS;
      send_sample(int'(400.0 * $sin(ph1)), int'(400.0 * $sin(ph2)));
    end
    repeat (4 * SAMPLE_W) @(negedge clk);
    checks++;
    if (idx_log[0].size() != 100_000 / N) begin
      failures++; $display("FAIL %0d windows for 100k samples", idx_log[0].size());
    end
    for (int w = 1; w < idx_log[0].size(); w++) begin
      checks++;
      if (pair_log[w] < 24 || pair_log[w] > 26 || idx_log[0][w] < 853 - 40 || idx_log[0][w] > 853 + 40) begin
        failures++;
        $display("FAIL tones window %0d: %0d pairs, index %0d", w, pair_log[w], idx_log[0][w]);
      end
    end
    $display("tones 25/30 Hz: %0d windows, first indices %0d %0d %0d, pairs %0d %0d %0d",
             idx_log[0].size(), idx_log[0][1], idx_log[0][2], idx_log[0][3], pair_log[1], pair_log[2], pair_log[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
