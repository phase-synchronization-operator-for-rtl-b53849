// tb_dda_configs: runs the 25 Hz / 30 Hz two-tone experiment on the other
// characterised configurations of the processor, each built through the
// parameters of dda_top: the default (10-bit, M = 10, Q = 2, alpha = 1/32),
// 10-bit with alpha = 1/16, M = 12 with Q = 2 and with Q = 4, and 8-bit and
// 12-bit samples. All instances must report 25 pairs per window and an
// index near 853 (see dda_tone_run).
module tb_dda_configs;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NC = 6;
  logic done [NC];
  int   c [NC], f [NC];

  dda_tone_run #(.SAMPLE_W(10), .M(10), .Q(2), .OUT_SHIFT(5)) u0 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]));
  dda_tone_run #(.SAMPLE_W(10), .M(10), .Q(2), .OUT_SHIFT(4)) u1 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]));
  dda_tone_run #(.SAMPLE_W(10), .M(12), .Q(2), .OUT_SHIFT(4)) u2 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]));
  dda_tone_run #(.SAMPLE_W(10), .M(12), .Q(4), .OUT_SHIFT(5)) u3 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]));
  dda_tone_run #(.SAMPLE_W(8),  .M(10), .Q(2), .OUT_SHIFT(5)) u4 (.clk, .done(done[4]), .checks(c[4]), .failures(f[4]));
  dda_tone_run #(.SAMPLE_W(12), .M(10), .Q(2), .OUT_SHIFT(5)) u5 (.clk, .done(done[5]), .checks(c[5]), .failures(f[5]));

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks = 0, failures = 0;
    @(posedge clk);
    for (int i = 0; i < NC; i++) wait (done[i]);
    for (int i = 0; i < NC; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
