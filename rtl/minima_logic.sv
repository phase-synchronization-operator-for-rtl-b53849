// minima_logic: combinational decision whether the recent comparison history
// of a signal shows a local minimum.
//
// dir[0] compares the newest sample with the one before it and dir[M-1] the
// oldest pair; 1 means the signal rose (or stayed flat), 0 that it fell.
// A minimum is reported at the centre of the history when
//   - the older half dir[M-1:M/2] holds at least M/2-Q falls,
//   - the newer half dir[M/2-1:0] holds at least M/2-Q rises, and
//   - the two comparisons next to the centre are a fall followed by a rise.
// Up to Q comparisons of each half may therefore go the "wrong" way, which
// suppresses noise outliers on both flanks of the minimum, and the centre
// condition places the minimum exactly M/2 samples before the newest one.
// The outlier-tolerant majority is the published idea; the exact gate rule
// above is this design's own. Purely combinational.
module minima_logic #(
  parameter int unsigned M = dda_pkg::HIST_M,
  parameter int unsigned Q = dda_pkg::OUTLIER_Q
) (
  input  logic [M-1:0] dir,
  output logic         found
);

  localparam int unsigned H  = M / 2;
  localparam int unsigned CW = $clog2(H + 1);

  logic [CW-1:0] rises_new, falls_old;

  always_comb begin
    rises_new = '0;
    falls_old = '0;
    for (int unsigned i = 0; i < H; i++) begin
      rises_new = rises_new + CW'(dir[i]);
      falls_old = falls_old + CW'(!dir[M-1-i]);
    end
    found = dir[H-1] && !dir[H]
         && (rises_new >= CW'(H - Q))
         && (falls_old >= CW'(H - Q));
  end

endmodule
