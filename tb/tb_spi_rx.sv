// tb_spi_rx: self-checking testbench for the serial-to-parallel input port.
// Sends random 10-bit words MSB first with the frame marker on the MSB and
// random idle gaps (plus stray bits outside frames, which must be ignored),
// and checks every received word, that exactly one valid strobe appears per
// word, and that it comes on the clock edge right after the LSB.
module tb_spi_rx;
  localparam int W = 10;
  logic clk = 0, rst_n = 0, sfrm = 0, sdi = 0;
  logic [W-1:0] data;
  logic valid;
  int checks = 0, failures = 0, nvalid = 0, cyc = 0;

  spi_rx #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && valid) nvalid <= nvalid + 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [W-1:0] w);
    for (int b = W - 1; b >= 0; b--) begin
      sfrm <= (b == W - 1);
      sdi  <= w[b];
      @(posedge clk);
    end
    sfrm <= 0;
    sdi  <= $urandom_range(0, 1);
    // the word is registered on the edge that sampled the LSB
    #1;
    checks++;
    if (!valid || data !== w) begin
      failures++;
      $display("FAIL word %h got %h valid %b", w, data, valid);
    end
  endtask

  initial begin
    automatic int sent = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) begin sdi <= $urandom_range(0, 1); @(posedge clk); end
    for (int i = 0; i < 500; i++) begin
      logic [W-1:0] w;
      w = W'($urandom);
      if (i == 0) w = '0;
      if (i == 1) w = '1;
      send(w);
      sent++;
      repeat ($urandom_range(0, 4)) begin
        sdi <= $urandom_range(0, 1);
        @(posedge clk);
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (nvalid != sent) begin
      failures++;
      $display("FAIL %0d strobes for %0d words", nvalid, sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
