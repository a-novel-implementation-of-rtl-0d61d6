// region_detect_tb: self-checking test of the region two detector.
//
// Instances for H = 90 (H' = 88), H = 75 (H' = 72) and H = 80 (H' = 80, no
// region two), all with n = 4 and 7-bit y. For every y in 0..H-1 the output
// is compared with y >= H' worked out by the testbench. The rows the
// 75-high example names (72, 73, 74 row-major, 71 tiled) are also checked
// individually, and the test counts that both outcomes occurred.
module region_detect_tb;

  int checks = 0;
  int failures = 0;
  int seen_r1 = 0;
  int seen_r2 = 0;

  logic [6:0] y;
  logic       r90, r75, r80;

  region_detect                 dut90 (.y_hi(y[6:2]), .in_region2(r90));
  region_detect #(.H(75), .N(4)) dut75 (.y_hi(y[6:2]), .in_region2(r75));
  region_detect #(.H(80), .N(4)) dut80 (.y_hi(y[6:2]), .in_region2(r80));

  task automatic cmp(input int h, input logic got);
    int  hp;
    logic expected;
    hp = h - (h % 4);
    if (int'(y) >= h) return;
    expected = (int'(y) >= hp);
    checks++;
    if (got) seen_r2++; else seen_r1++;
    if (got !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL H=%0d y=%0d: got %0b expected %0b", h, y, got, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < 128; i++) begin
      y = 7'(i);
      #1;
      cmp(90, r90);
      cmp(75, r75);
      cmp(80, r80);
    end
    // The rows of the 75 x 75 example.
    for (int v = 71; v <= 74; v++) begin
      y = 7'(v);
      #1;
      checks++;
      if (r75 !== (v >= 72)) begin
        failures++;
        $display("FAIL 75-row example y=%0d got %0b", v, r75);
      end
    end
    checks++;
    if (seen_r1 == 0 || seen_r2 == 0) begin
      failures++;
      $display("FAIL region coverage r1=%0d r2=%0d", seen_r1, seen_r2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
