// tb_sync_index: self-checking testbench for the synchronization indexing
// block. A small instance (N = 32) and one at the default N = 1024 receive
// random |dT| values on random sample ticks with random r and T_os; each
// window result is compared with N - 2^r * min(sum - T_os, N / 2^r), limited
// to N when sum < T_os, and must appear exactly N ticks after the previous
// one. Limiter and floor cases are forced and counted.
module tb_sync_index;
  localparam int NS = 32, NL = 1024, CW = 11;
  logic clk = 0, rst_n = 0, en = 0, d_valid = 0;
  logic [CW-1:0] d = 0;
  logic [3:0] r_sel = 0;
  logic [7:0] tos = 0;
  logic [5:0]  idx_s;
  logic [10:0] idx_l;
  logic iv_s, iv_l, lim_s, lim_l, fl_s, fl_l;
  int checks = 0, failures = 0, nlim = 0, nfloor = 0, nmid = 0, nwin_l = 0;

  sync_index #(.N(NS), .CW(CW)) dut_s (.clk, .rst_n, .en, .d_valid, .d, .r_sel, .tos,
    .idx(idx_s), .idx_valid(iv_s), .limited(lim_s), .floored(fl_s));
  sync_index dut_l (.clk, .rst_n, .en, .d_valid, .d, .r_sel, .tos,
    .idx(idx_l), .idx_valid(iv_l), .limited(lim_l), .floored(fl_l));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_idx(int n, int sum, int r, int t, output bit lim, output bit fl);
    int logn = $clog2(n), rr, cap, ex;
    rr  = r > logn ? logn : r;
    cap = n >> rr;
    lim = sum < t;
    fl  = 0;
    if (lim) return n;
    ex = sum - t;
    if (ex >= cap) begin fl = 1; return 0; end
    return n - (ex << rr);
  endfunction

  int sum_s = 0, sum_l = 0, tick_s = 0, tick_l = 0;

  task automatic tick(input bit dv, input int dd);
    int e; bit el, ef;
    @(negedge clk);
    en = 1; d_valid = dv; d = CW'(dd);
    if (dv) begin
      sum_s = sum_s + dd; sum_l = sum_l + dd;
      if (sum_s > 65535) sum_s = 65535;
      if (sum_l > 65535) sum_l = 65535;
    end
    tick_s++; tick_l++;
    @(posedge clk);
    #1;
    checks++;
    if (iv_s != (tick_s == NS)) begin failures++; $display("FAIL small window timing"); end
    if (tick_s == NS) begin
      e = ref_idx(NS, sum_s, int'(r_sel), int'(tos), el, ef);
      checks++;
      if (int'(idx_s) != e || lim_s != el || fl_s != ef) begin
        failures++;
        $display("FAIL N=%0d sum %0d r %0d tos %0d got %0d exp %0d", NS, sum_s, r_sel, tos, idx_s, e);
      end
      if (el) nlim++; else if (ef) nfloor++; else nmid++;
      sum_s = 0; tick_s = 0;
    end
    checks++;
    if (iv_l != (tick_l == NL)) begin failures++; $display("FAIL large window timing"); end
    if (tick_l == NL) begin
      e = ref_idx(NL, sum_l, int'(r_sel), int'(tos), el, ef);
      checks++;
      if (int'(idx_l) != e || lim_l != el || fl_l != ef) begin
        failures++;
        $display("FAIL N=%0d sum %0d r %0d tos %0d got %0d exp %0d", NL, sum_l, r_sel, tos, idx_l, e);
      end
      nwin_l++;
      sum_l = 0; tick_l = 0;
    end
    @(negedge clk);
    en = 0; d_valid = 0;
    repeat ($urandom_range(0, 1)) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int w = 0; w < 300; w++) begin
      // settings change only at small-window boundaries
      r_sel = 4'($urandom_range(0, 6));
      tos   = 8'($urandom_range(0, 12));
      for (int s = 0; s < NS; s++) begin
        automatic int kind = w % 3;
        automatic bit dv = ($urandom_range(0, 7) == 0);
        automatic int dd = (kind == 0) ? $urandom_range(0, 2) : (kind == 1) ? $urandom_range(0, 6) : $urandom_range(0, 40);
        tick(dv, dd);
      end
    end
    checks++;
    if (nlim == 0 || nfloor == 0 || nmid == 0 || nwin_l < 5) begin
      failures++;
      $display("FAIL coverage lim %0d floor %0d mid %0d large %0d", nlim, nfloor, nmid, nwin_l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
