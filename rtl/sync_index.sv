// sync_index: synchronization indexing block.
//
// Accumulates the period differences |dT| over non-overlapping windows of N
// sample ticks and, when a window closes, produces the scaled index
//   idx = N * S = N - 2^r * min(sum - T_os, N / 2^r)
// with selectivity r (0..log2 N, larger values clamp to log2 N) and offset
// T_os given at run time. Only shifts, a subtracter and a comparator are used.
// If sum < T_os the index would exceed N; the limiter then outputs N (S = 1)
// and raises `limited`. `floored` marks a window whose sum reached
// N/2^r + T_os, giving index 0. A difference that arrives in the last tick of
// a window counts in that window. `idx`, `idx_valid`, `limited` and `floored`
// are registered: they update on the clock edge that ends the window, and
// `idx_valid` is high for that one clock. The accumulator saturates.
// Equation, window and limiter follow the published design; widths,
// saturation and the r clamp are this design's choice.
module sync_index #(
  parameter int unsigned N     = dda_pkg::WIN_N,
  parameter int unsigned CW    = dda_pkg::CNT_W,
  parameter int unsigned ACC_W = dda_pkg::ACC_W,
  parameter int unsigned TOS_W = dda_pkg::TOS_W,
  parameter int unsigned R_W   = dda_pkg::R_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   d_valid,
  input  logic [CW-1:0]          d,
  input  logic [R_W-1:0]         r_sel,
  input  logic [TOS_W-1:0]       tos,
  output logic [$clog2(N):0]     idx,
  output logic                   idx_valid,
  output logic                   limited,
  output logic                   floored
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned OW   = LOGN + 1;
  localparam int unsigned WCW  = (LOGN > 0) ? LOGN : 1;

  logic [ACC_W-1:0] acc, acc_in;
  logic [ACC_W:0]   acc_sum;
  logic [WCW-1:0]   tick;         // samples already in the window
  logic             last;
  logic [R_W-1:0]   r_eff;
  logic [ACC_W-1:0] excess;       // sum - T_os, valid when not limited
  logic [OW-1:0]    cap;          // N / 2^r
  logic [OW-1:0]    idx_c;
  logic             lim_c, floor_c;

  assert property (@(posedge clk) disable iff (!rst_n) d_valid |-> en)
    else $error("sync_index: d_valid outside a sample tick");

  always_comb begin
    acc_sum = {1'b0, acc} + (d_valid ? (ACC_W + 1)'(d) : '0);
    acc_in  = acc_sum[ACC_W] ? '1 : acc_sum[ACC_W-1:0];
    last    = (tick == WCW'(N - 1));
    r_eff   = (r_sel > R_W'(LOGN)) ? R_W'(LOGN) : r_sel;
    cap     = OW'(N) >> r_eff;
    lim_c   = acc_in < ACC_W'(tos);
    excess  = acc_in - ACC_W'(tos);
    floor_c = !lim_c && (excess >= ACC_W'(cap));
    if (lim_c)        idx_c = OW'(N);
    else if (floor_c) idx_c = '0;
    else              idx_c = OW'(N) - (OW'(excess) << r_eff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      tick      <= '0;
      idx       <= '0;
      idx_valid <= 1'b0;
      limited   <= 1'b0;
      floored   <= 1'b0;
    end else begin
      idx_valid <= 1'b0;
      if (en) begin
        if (last) begin
          acc       <= '0;
          tick      <= '0;
          idx       <= idx_c;
          idx_valid <= 1'b1;
          limited   <= lim_c;
          floored   <= floor_c;
        end else begin
          acc  <= acc_in;
          tick <= tick + WCW'(1);
        end
      end
    end
  end

endmodule
