// tb_pairing_fsm: self-checking testbench for the period pairing FSM.
// Random period events on both channels (alone, together, or repeated on one
// channel before the other answers) are compared with a reference model of
// the pairing rule: the latest period of each channel is kept, a pair is
// formed as soon as both are present, and its |T1 - T2| is reported in the
// same cycle. Also checks the overwrite flag and the Fig.-1-style sequence.
module tb_pairing_fsm;
  localparam int CW = 11;
  logic clk = 0, rst_n = 0;
  logic p1_valid = 0, p2_valid = 0;
  logic [CW-1:0] p1 = 0, p2 = 0, d;
  logic d_valid, overwrite;
  int checks = 0, failures = 0, npairs = 0, nover = 0;

  pairing_fsm #(.CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit m_v1 = 0, m_v2 = 0;
  int m_t1, m_t2;

  task automatic ev(input bit a, input int ta, input bit b, input int tb_);
    bit ev_, eo;
    int ed;
    @(negedge clk);
    p1_valid = a; p1 = CW'(ta);
    p2_valid = b; p2 = CW'(tb_);
    #1;
    eo = (a && m_v1) || (b && m_v2);
    if (a) begin m_t1 = ta; m_v1 = 1; end
    if (b) begin m_t2 = tb_; m_v2 = 1; end
    ev_ = m_v1 && m_v2;
    ed  = m_t1 > m_t2 ? m_t1 - m_t2 : m_t2 - m_t1;
    if (ev_) begin m_v1 = 0; m_v2 = 0; end
    checks++;
    if (d_valid != ev_ || (ev_ && int'(d) != ed) || overwrite != eo) begin
      failures++;
      $display("FAIL a%0b %0d b%0b %0d: got v%b d%0d o%b exp v%b d%0d o%b",
               a, ta, b, tb_, d_valid, d, overwrite, ev_, ed, eo);
    end
    if (d_valid) npairs++;
    if (overwrite) nover++;
    @(negedge clk);
    p1_valid = 0; p2_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // sequence like Fig. 1: s1 period, s2 period, ... two s1 periods in a row
    ev(1, 50, 0, 0);
    ev(0, 0, 1, 47);     // pair |50-47| = 3
    ev(0, 0, 1, 52);
    ev(1, 49, 0, 0);     // pair 3
    ev(1, 51, 0, 0);
    ev(1, 48, 0, 0);     // overwrites 51
    ev(0, 0, 1, 53);     // pair |48-53| = 5
    ev(1, 60, 1, 60);    // both at once, pair 0
    for (int i = 0; i < 5000; i++) begin
      automatic int k = $urandom_range(0, 9);
      ev(k < 4 || k == 9, $urandom_range(0, 2047), (k >= 4 && k < 8) || k == 9, $urandom_range(0, 2047));
    end
    checks++;
    if (npairs < 100 || nover < 100) begin
      failures++;
      $display("FAIL coverage pairs %0d overwrites %0d", npairs, nover);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
