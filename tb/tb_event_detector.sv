// tb_event_detector: self-checking testbench for the local-minimum detector.
// Part 1 applies clean V-shaped waveforms and a V with one outlier on each
// flank and checks that exactly one minimum is reported, M/2 samples after
// the true minimum. Part 2 drives a noisy sine with random tick spacing and
// compares every tick with a reference model of comparator, history
// register, outlier-tolerant majority and re-arming rule.
module tb_event_detector;
  localparam int W = 10, M = 10, Q = 2;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] x = 0;
  logic min_o;
  int checks = 0, failures = 0, nmin = 0;

  event_detector #(.W(W), .M(M), .Q(Q)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int  m_prev;
  bit  m_primed;
  bit  m_hist[M-1];   // m_hist[0] newest stored comparison
  int  sample_no;

  function automatic bit model_step(int v);
    bit d[M];
    int up = 0, dn = 0;
    bit f;
    if (!m_primed) begin
      m_primed = 1; m_prev = v;
      return 0;
    end
    d[0] = (v >= m_prev);
    for (int i = 1; i < M; i++) d[i] = m_hist[i-1];
    for (int i = 0; i < M/2; i++) if (d[i]) up++;
    for (int i = M/2; i < M; i++) if (!d[i]) dn++;
    f = d[M/2-1] && !d[M/2] && up >= M/2 - Q && dn >= M/2 - Q;
    for (int i = 0; i < M-1; i++) m_hist[i] = f ? 1'b1 : d[i];
    m_prev = v;
    return f;
  endfunction

  task automatic tick(input int v, output bit got);
    bit exp;
    @(negedge clk);
    x  = W'(v);
    en = 1;
    #1;
    exp = model_step(v);
    got = min_o;
    checks++;
    if (min_o != exp) begin
      failures++;
      $display("FAIL sample %0d value %0d got %b exp %b", sample_no, v, min_o, exp);
    end
    if (min_o) nmin++;
    @(negedge clk);
    en = 0;
    sample_no++;
  endtask

  initial begin
    bit g;
    int pos;
    m_primed = 0;
    for (int i = 0; i < M-1; i++) m_hist[i] = 1;
    sample_no = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Part 1: V shapes with the minimum at a known sample
    for (int rep = 0; rep < 4; rep++) begin
      automatic int base = sample_no, seen = 0;
      for (int k = -12; k <= 12; k++) begin
        automatic int v = (k < 0 ? -k : k) * 20 - 200;
        if (rep >= 2 && k == -4) v += 30;   // upward outlier on the falling flank
        if (rep >= 2 && k == 3)  v -= 30;   // downward outlier on the rising flank
        tick(v, g);
        if (g) begin
          seen++;
          pos = sample_no - 1 - base;
          checks++;
          if (pos != 12 + M/2) begin
            failures++;
            $display("FAIL V %0d minimum reported at %0d", rep, pos);
          end
        end
      end
      checks++;
      if (seen != 1) begin
        failures++;
        $display("FAIL V %0d reported %0d minima", rep, seen);
      end
    end
    // Part 2: noisy sine, random spacing between ticks
    for (int i = 0; i < 6000; i++) begin
      automatic real ph = 2.0 * 3.14159265 * 23.0 * i / 1024.0;
      automatic int v = int'(300.0 * $sin(ph)) + $urandom_range(0, 40) - 20;
      tick(v, g);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    checks++;
    if (nmin < 100) begin
      failures++;
      $display("FAIL only %0d minima", nmin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
