// tb_minima_logic: exhaustive self-checking testbench for the minimum
// decision. All 2^M histories (M = 10, Q = 2, and M = 12, Q = 4) are applied
// and the output is compared with a reference that counts rises and falls in
// each half of the history and checks the fall/rise pair at the centre.
module tb_minima_logic;
  logic [9:0]  dir_a;
  logic [11:0] dir_b;
  logic        found_a, found_b;
  int checks = 0, failures = 0, hits = 0;

  minima_logic #(.M(10), .Q(2)) dut_a (.dir(dir_a), .found(found_a));
  minima_logic #(.M(12), .Q(4)) dut_b (.dir(dir_b), .found(found_b));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_min(int unsigned v, int m, int q);
    int h = m / 2, up = 0, dn = 0;
    for (int i = 0; i < h; i++) if (v[i]) up++;
    for (int i = h; i < m; i++) if (!v[i]) dn++;
    return v[h-1] && !v[h] && up >= h - q && dn >= h - q;
  endfunction

  initial begin
    for (int unsigned v = 0; v < 4096; v++) begin
      dir_a = 10'(v);
      dir_b = 12'(v);
      #1;
      if (v < 1024) begin
        checks++;
        if (found_a != ref_min(v, 10, 2)) begin
          failures++;
          $display("FAIL M10 %b got %b", dir_a, found_a);
        end
        if (found_a) hits++;
      end
      checks++;
      if (found_b != ref_min(v, 12, 4)) begin
        failures++;
        $display("FAIL M12 %b got %b", dir_b, found_b);
      end
    end
    // a clean V: five falls then five rises (newest bits are rises)
    dir_a = 10'b00000_11111;
    #1;
    checks++;
    if (!found_a) begin failures++; $display("FAIL clean V"); end
    // two outliers on each side are tolerated, three are not
    dir_a = 10'b01010_11010; #1;
    checks++;
    if (!found_a) begin failures++; $display("FAIL 2 outliers"); end
    dir_a = 10'b01010_10100; #1;
    checks++;
    if (found_a) begin failures++; $display("FAIL 3 outliers accepted"); end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
