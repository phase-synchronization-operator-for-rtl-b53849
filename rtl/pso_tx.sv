// pso_tx: parallel-to-serial output port.
//
// A `load` pulse captures the W-bit word; from the next clock on the port
// drives it on `sdo`, MSB first, one bit per clock, with `so_frm` high during
// the MSB and `busy` high for all W bits. `sdo` is 0 while idle. A load while
// a word is still being sent restarts with the new word. The framing matches
// the input ports; it is this design's choice.
module pso_tx #(
  parameter int unsigned W = dda_pkg::idx_width(dda_pkg::WIN_N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] data,
  output logic         sdo,
  output logic         so_frm,
  output logic         busy
);

  localparam int unsigned BCW = $clog2(W + 1);

  logic [W-1:0]   shreg;
  logic [BCW-1:0] left;    // bits still to send, including the one on sdo

  assign sdo    = (left != '0) && shreg[W-1];
  assign so_frm = (left == BCW'(W));
  assign busy   = (left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      left  <= '0;
    end else if (load) begin
      shreg <= data;
      left  <= BCW'(W);
    end else if (left != '0) begin
      shreg <= shreg << 1;
      left  <= left - BCW'(1);
    end
  end

endmodule
