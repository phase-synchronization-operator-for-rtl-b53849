// period_counter: transition-period counter for one channel.
//
// Counts sample ticks since the last minimum of its channel. In the tick in
// which a minimum is reported (`min_i` with `en`), it offers the period
// T = samples from the previous minimum to this one on `period` with
// `period_valid` (both combinational, same cycle) and restarts from zero.
// The first minimum after reset only starts counting, since no complete
// period exists yet. The count saturates at 2^CW-1, so very long gaps read as
// the largest period. One count per sample follows the design, whose core
// clock equals the sample rate; width and saturation are this design's choice.
module period_counter #(
  parameter int unsigned CW = dda_pkg::CNT_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          min_i,
  output logic [CW-1:0] period,
  output logic          period_valid
);

  logic [CW-1:0] cnt;
  logic          armed;   // a minimum has been seen since reset

  assign period       = (cnt == '1) ? cnt : cnt + CW'(1);
  assign period_valid = en && min_i && armed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      armed <= 1'b0;
    end else if (en) begin
      if (min_i) begin
        cnt   <= '0;
        armed <= 1'b1;
      end else if (cnt != '1) begin
        cnt <= cnt + CW'(1);
      end
    end
  end

endmodule
