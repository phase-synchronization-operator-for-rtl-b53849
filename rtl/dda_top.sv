// dda_top: two-channel DDA (Delay Difference Analysis) phase synchronization
// processor.
//
// Two band-limited signals arrive as 10-bit serial samples. Each channel is
// smoothed by an exponential filter, and an event detector finds its local
// minima; a counter times the transition period between consecutive minima.
// The pairing FSM matches the latest period of one channel with the next of
// the other and forms |T1 - T2|; the indexing block sums these differences
// over a window of N samples and maps the sum to N*S in 0..N (N = perfect
// locking, 0 = none) with the run-time selectivity r and offset T_os. The
// index is smoothed by a second exponential filter (alpha = 1/32) and sent
// out serially.
//
// Timing: one clock `clk` at the serial bit rate (SAMPLE_W bits per sample,
// 10x the sample rate). The word strobe of the channel-1 input port is the
// sample tick that advances the whole core, standing in for a separate slow
// core clock; both input ports share the frame marker `sfrm`, so their words
// complete together. A new index leaves on `sdo` starting one clock after
// the window closes, MSB first, with `so_frm` on the MSB.
// Test outputs (tp_*) bring out the minima, the pair pulse, the raw and the
// smoothed index and the limiter/overwrite flags.
// The block structure follows the published processor; the single-clock
// scheme, the serial framing, the input smoothing factor and the widths of
// r and T_os are this design's choices.
module dda_top #(
  parameter int unsigned SAMPLE_W  = dda_pkg::SAMPLE_W,
  parameter int unsigned N         = dda_pkg::WIN_N,
  parameter int unsigned M         = dda_pkg::HIST_M,
  parameter int unsigned Q         = dda_pkg::OUTLIER_Q,
  parameter int unsigned IN_SHIFT  = dda_pkg::IN_SHIFT,
  parameter int unsigned OUT_SHIFT = dda_pkg::OUT_SHIFT,
  parameter int unsigned CNT_W     = dda_pkg::CNT_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // serial sample inputs
  input  logic                      sfrm,
  input  logic                      sdi1,
  input  logic                      sdi2,
  // run-time settings
  input  logic [dda_pkg::R_W-1:0]   r_sel,
  input  logic [dda_pkg::TOS_W-1:0] tos,
  // serial index output
  output logic                      sdo,
  output logic                      so_frm,
  // test points
  output logic                      tp_min1,
  output logic                      tp_min2,
  output logic                      tp_pair,
  output logic [$clog2(N):0]        tp_idx,
  output logic                      tp_idx_valid,
  output logic [$clog2(N):0]        tp_idx_smooth,
  output logic                      tp_limited,
  output logic                      tp_floored,
  output logic                      tp_overwrite
);

  localparam int unsigned OW = $clog2(N) + 1;

  logic [SAMPLE_W-1:0]        raw1, raw2;
  logic                       v1, v2, tick;
  logic signed [SAMPLE_W-1:0] sm1, sm2;
  logic                       min1, min2;
  logic [CNT_W-1:0]           per1, per2, dlt;
  logic                       pv1, pv2, dv;
  logic signed [OW:0]         idx_s_in, idx_s_out;
  logic                       idx_valid_q;

  // ---------------------------------------------------------------- inputs
  spi_rx #(.W(SAMPLE_W)) u_rx1 (
    .clk, .rst_n, .sfrm, .sdi(sdi1), .data(raw1), .valid(v1));
  spi_rx #(.W(SAMPLE_W)) u_rx2 (
    .clk, .rst_n, .sfrm, .sdi(sdi2), .data(raw2), .valid(v2));

  assign tick = v1;

  assert property (@(posedge clk) disable iff (!rst_n) v1 == v2)
    else $error("dda_top: input words of the two channels out of step");

  // ------------------------------------------------------ input smoothing
  exp_smoother #(.W(SAMPLE_W), .SHIFT(IN_SHIFT)) u_sm1 (
    .clk, .rst_n, .en(tick), .x(raw1), .y(sm1));
  exp_smoother #(.W(SAMPLE_W), .SHIFT(IN_SHIFT)) u_sm2 (
    .clk, .rst_n, .en(tick), .x(raw2), .y(sm2));

  // The smoothed samples are registered and change on the tick edge, so
  // the detectors see them one clock after the tick; delay the tick to match.
  logic tick_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tick_d <= 1'b0;
    else        tick_d <= tick;
  end

  // -------------------------------------------------------- event detection
  event_detector #(.W(SAMPLE_W), .M(M), .Q(Q)) u_ev1 (
    .clk, .rst_n, .en(tick_d), .x(sm1), .min_o(min1));
  event_detector #(.W(SAMPLE_W), .M(M), .Q(Q)) u_ev2 (
    .clk, .rst_n, .en(tick_d), .x(sm2), .min_o(min2));

  // ------------------------------------------------------- period counters
  period_counter #(.CW(CNT_W)) u_cnt1 (
    .clk, .rst_n, .en(tick_d), .min_i(min1), .period(per1), .period_valid(pv1));
  period_counter #(.CW(CNT_W)) u_cnt2 (
    .clk, .rst_n, .en(tick_d), .min_i(min2), .period(per2), .period_valid(pv2));

  // ----------------------------------------------------------- pairing FSM
  pairing_fsm #(.CW(CNT_W)) u_pair (
    .clk, .rst_n, .p1_valid(pv1), .p1(per1), .p2_valid(pv2), .p2(per2),
    .d_valid(dv), .d(dlt), .overwrite(tp_overwrite));

  // ------------------------------------------------------------- indexing
  sync_index #(.N(N), .CW(CNT_W)) u_idx (
    .clk, .rst_n, .en(tick_d), .d_valid(dv), .d(dlt), .r_sel, .tos,
    .idx(tp_idx), .idx_valid(idx_valid_q), .limited(tp_limited),
    .floored(tp_floored));

  // ------------------------------------------------------ index smoothing
  assign idx_s_in = {1'b0, tp_idx};

  exp_smoother #(.W(OW + 1), .SHIFT(OUT_SHIFT)) u_sm_idx (
    .clk, .rst_n, .en(idx_valid_q), .x(idx_s_in), .y(idx_s_out));

  // The smoothed index is registered on the window-close edge; load the
  // output port one clock later.
  logic load_out;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) load_out <= 1'b0;
    else        load_out <= idx_valid_q;
  end

  assign tp_idx_smooth = idx_s_out[OW-1:0];

  // ---------------------------------------------------------------- output
  pso_tx #(.W(OW)) u_tx (
    .clk, .rst_n, .load(load_out), .data(tp_idx_smooth), .sdo, .so_frm,
    .busy());

  assign tp_min1      = min1;
  assign tp_min2      = min2;
  assign tp_pair      = dv;
  assign tp_idx_valid = idx_valid_q;

endmodule
