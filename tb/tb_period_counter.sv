// tb_period_counter: self-checking testbench for the transition-period
// counter. Minima are applied at random sample distances (including
// distances beyond the counter range, which must saturate) with random idle
// clocks between ticks; every offered period is compared with the distance
// in samples between the two minima, and the first minimum after reset must
// offer nothing.
module tb_period_counter;
  localparam int CW = 6;
  logic clk = 0, rst_n = 0, en = 0, min_i = 0;
  logic [CW-1:0] period;
  logic period_valid;
  int checks = 0, failures = 0;

  period_counter #(.CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gap, expv;
    bit first = 1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 400; i++) begin
      gap = (i % 10 == 9) ? $urandom_range(60, 90) : $urandom_range(1, 50);
      if (first) gap = 5;
      for (int s = 0; s < gap; s++) begin
        @(negedge clk);
        en = 1; min_i = (s == gap - 1);
        #1;
        if (s == gap - 1) begin
          checks++;
          expv = (gap > (1 << CW) - 1) ? (1 << CW) - 1 : gap;
          if (first) begin
            if (period_valid) begin failures++; $display("FAIL period at first minimum"); end
          end else if (!period_valid || int'(period) != expv) begin
            failures++;
            $display("FAIL gap %0d got %0d valid %b", gap, period, period_valid);
          end
        end else begin
          checks++;
          if (period_valid) begin failures++; $display("FAIL spurious valid"); end
        end
        @(negedge clk);
        en = 0; min_i = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      first = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
