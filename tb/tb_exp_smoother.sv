// tb_exp_smoother: self-checking testbench for the exponential smoother.
// Two instances (alpha = 1/32 on 12-bit data, alpha = 1/4 on 10-bit data)
// are driven with random samples and random update strobes; each output is
// compared with y = y - floor(y / 2^S) + floor(x / 2^S) computed in integer
// arithmetic, and with the rule that y stays inside the range of the inputs.
// A constant input is also applied long enough to check the settled value.
module tb_exp_smoother;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [11:0] xa, ya;
  logic signed [9:0]  xb, yb;
  int checks = 0, failures = 0;
  int ma = 0, mb = 0;

  exp_smoother #(.W(12), .SHIFT(5)) dut_a (.clk, .rst_n, .en, .x(xa), .y(ya));
  exp_smoother #(.W(10), .SHIFT(2)) dut_b (.clk, .rst_n, .en, .x(xb), .y(yb));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fdiv(int v, int s);   // floor(v / 2^s)
    int d = 1 << s;
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  task automatic step(input int a, input int b, input bit e);
    @(negedge clk);
    xa = 12'(a); xb = 10'(b); en = e;
    @(posedge clk);
    if (e) begin
      ma = ma - fdiv(ma, 5) + fdiv(a, 5);
      mb = mb - fdiv(mb, 2) + fdiv(b, 2);
    end
    #1;
    checks++;
    if (int'(ya) != ma || int'(yb) != mb) begin
      failures++;
      $display("FAIL a %0d/%0d b %0d/%0d", ya, ma, yb, mb);
    end
  endtask

  initial begin
    xa = 0; xb = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++)
      step($urandom_range(0, 4095) - 2048, $urandom_range(0, 1023) - 512, $urandom_range(0, 3) != 0);
    for (int i = 0; i < 400; i++) step(2047, 511, 1);
    checks++;
    if (ya < 2047 - 31 || yb < 511 - 3) begin
      failures++;
      $display("FAIL settle high %0d %0d", ya, yb);
    end
    for (int i = 0; i < 400; i++) step(-2048, -512, 1);
    checks++;
    if (ya > -2048 + 31 || yb > -512 + 3) begin
      failures++;
      $display("FAIL settle low %0d %0d", ya, yb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
