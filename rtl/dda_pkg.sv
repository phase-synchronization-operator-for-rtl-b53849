// dda_pkg: constants shared by the DDA (Delay Difference Analysis) phase
// synchronization processor.
//
// The processor measures how well two band-limited signals are phase locked by
// timing the intervals between consecutive local minima of each signal and
// summing the absolute differences of paired intervals over a window.
// The numbers below are the defaults of the configuration the design was
// built around: 10-bit samples, a window of N = 1024 samples (one index per
// second at 1024 samples/s), a minima history of M = 10 comparisons that
// tolerates Q = 2 outliers per side, and an index smoothing factor of 1/32.
// The input smoothing factor (1/4), the counter width and the widths of the
// run-time settings r and T_os are this design's own choices.
package dda_pkg;

  localparam int unsigned SAMPLE_W  = 10;    // input sample resolution
  localparam int unsigned WIN_N     = 1024;  // samples per observation window
  localparam int unsigned HIST_M    = 10;    // comparison history length
  localparam int unsigned OUTLIER_Q = 2;     // tolerated outliers per side
  localparam int unsigned IN_SHIFT  = 2;     // input smoothing alpha = 2^-2
  localparam int unsigned OUT_SHIFT = 5;     // index smoothing alpha = 2^-5
  localparam int unsigned CNT_W     = 11;    // transition period counter width
  localparam int unsigned ACC_W     = 16;    // |dT| accumulator width
  localparam int unsigned TOS_W     = 8;     // offset T_os width
  localparam int unsigned R_W       = 4;     // selectivity r width

  // Width of the scaled index N*S, which spans 0..N.
  function automatic int unsigned idx_width(int unsigned n);
    return $clog2(n) + 1;
  endfunction

endpackage
