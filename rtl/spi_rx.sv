// spi_rx: serial-to-parallel input port for one signal channel.
//
// A sample arrives as W serial bits, MSB first, one bit per clock. The sender
// raises sfrm together with the MSB; the port then shifts in the remaining
// W-1 bits and, on the clock that holds the LSB, updates `data` and pulses
// `valid` for one clock (the received word appears on the clock edge after
// the LSB). Bits seen while no frame is open are ignored; a new sfrm restarts
// the word. The design runs the input port at the bit rate, W times the
// sample rate, so the word strobe doubles as the sample tick of the core.
// Framing, bit order and two's complement coding are this design's choice.
module spi_rx #(
  parameter int unsigned W = dda_pkg::SAMPLE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sfrm,
  input  logic         sdi,
  output logic [W-1:0] data,
  output logic         valid
);

  localparam int unsigned BCW = $clog2(W + 1);

  logic [W-2:0]   shreg;   // bits received before the current one
  logic [BCW-1:0] nbits;   // bits received in the open frame, 0 = idle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      nbits <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (sfrm || nbits != '0) begin
        shreg <= {shreg[W-3:0], sdi};
        if ((sfrm ? BCW'(1) : nbits + BCW'(1)) == BCW'(W)) begin
          data  <= {shreg, sdi};
          valid <= 1'b1;
          nbits <= '0;
        end else begin
          nbits <= sfrm ? BCW'(1) : nbits + BCW'(1);
        end
      end
    end
  end

endmodule
