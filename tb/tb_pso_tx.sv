// tb_pso_tx: self-checking testbench for the parallel-to-serial output port.
// Random 11-bit words are loaded, sometimes back to back, sometimes with a
// new load interrupting a word; a receiver in the testbench collects bits
// from the frame marker on and compares each complete word with what was
// loaded, and checks the MSB leaves on the clock after the load.
module tb_pso_tx;
  localparam int W = 11;
  logic clk = 0, rst_n = 0, load = 0;
  logic [W-1:0] data = 0;
  logic sdo, so_frm, busy;
  int checks = 0, failures = 0;

  pso_tx #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] w, got;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      w = W'($urandom);
      load <= 1; data <= w;
      @(posedge clk);
      load <= 0; data <= 0;
      if (i % 17 == 5) begin
        // interrupt after a few bits; the new word must restart cleanly
        repeat (3) @(posedge clk);
        w = W'($urandom);
        load <= 1; data <= w;
        @(posedge clk);
        load <= 0;
      end
      #1;
      checks++;
      if (!so_frm || !busy) begin failures++; $display("FAIL no frame after load"); end
      got = '0;
      for (int b = 0; b < W; b++) begin
        got = {got[W-2:0], sdo};
        @(posedge clk);
        #1;
      end
      checks++;
      if (got != w || busy) begin
        failures++;
        $display("FAIL word %h got %h busy %b", w, got, busy);
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
