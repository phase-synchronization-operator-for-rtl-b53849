// event_detector: local-minimum (event) detector for one channel.
//
// Each sample tick (`en`) the comparator compares the incoming sample x with
// the previous one and shifts the result (1 = rise or flat, 0 = fall) into an
// M-bit history register; minima_logic inspects the history including the new
// bit. `min_o` is combinational and high in the tick whose sample completes a
// minimum pattern, so the minimum itself lies M/2 samples earlier; as both
// channels have the same delay, periods between minima are not affected.
// After a detection the history is refilled with rises so one minimum cannot
// be reported twice; the history also resets to all rises. The first sample
// after reset only loads the previous-sample register.
// Comparator + shift register + minima logic follow the published structure;
// the re-arming rule and the reset behaviour are this design's choice.
module event_detector #(
  parameter int unsigned W = dda_pkg::SAMPLE_W,
  parameter int unsigned M = dda_pkg::HIST_M,
  parameter int unsigned Q = dda_pkg::OUTLIER_Q
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic                min_o
);

  logic signed [W-1:0] prev;
  logic                primed;
  logic [M-2:0]        hist;        // the M-1 previous comparisons
  logic [M-1:0]        hist_next;
  logic                found;

  assign hist_next = {hist, (x >= prev)};

  minima_logic #(.M(M), .Q(Q)) u_logic (
    .dir   (hist_next),
    .found (found)
  );

  assign min_o = en && primed && found;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev   <= '0;
      primed <= 1'b0;
      hist   <= '1;
    end else if (en) begin
      prev   <= x;
      primed <= 1'b1;
      if (primed) hist <= found ? '1 : hist_next[M-2:0];
    end
  end

endmodule
