// exp_smoother: first-order exponential smoothing filter
//   y(k) = (1 - alpha) * y(k-1) + alpha * x(k),  alpha = 2^-SHIFT
// computed as y - (y >>> SHIFT) + (x >>> SHIFT): two arithmetic right shifts,
// one subtracter and one adder, with no multiplier. The state updates on the
// clock edge where `en` is high; `y` is the registered state. Both shifts
// truncate toward minus infinity and no guard bits are kept, as in a plain
// shift-register realisation; with that rounding y stays inside the range of
// the inputs, so no saturation is needed. The state resets to 0.
// The processor uses one instance per input channel and one on the index.
module exp_smoother #(
  parameter int unsigned W     = dda_pkg::SAMPLE_W,
  parameter int unsigned SHIFT = dda_pkg::OUT_SHIFT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  logic signed [W:0] y_ext, x_ext, next;

  assign y_ext = {y[W-1], y};
  assign x_ext = {x[W-1], x};
  assign next  = y_ext - (y_ext >>> SHIFT) + (x_ext >>> SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= next[W-1:0];
  end

endmodule
