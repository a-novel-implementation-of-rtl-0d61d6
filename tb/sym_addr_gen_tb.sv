// sym_addr_gen_tb: self-checking test of the symbolic address generator.
//
// A 7 x 5 generator and the default 90 x 90 one are clocked side by side
// with a random 'next' pattern. The testbench keeps its own index pair for
// each and compares x, y and 'last' every cycle: indices hold while 'next'
// is low, step in raster order while it is high, and wrap to (0, 0) after
// (W-1, H-1). A synchronous reset is applied in mid-sequence, once together
// with 'next' to check that reset wins. The 90 x 90 generator is also
// checked to wrap exactly after W*H = 8100 steps.
module sym_addr_gen_tb;

  int checks = 0;
  int failures = 0;
  int wraps_s = 0;
  int wraps_b = 0;
  int holds = 0;

  logic clk = 1'b0;
  logic reset;
  logic next;

  logic [2:0] xs, ys;
  logic       last_s;
  logic [6:0] xb, yb;
  logic       last_b;

  sym_addr_gen #(.W(7), .H(5)) dut_s (.clk(clk), .reset(reset), .next(next),
                                      .x(xs), .y(ys), .last(last_s));
  sym_addr_gen                 dut_b (.clk(clk), .reset(reset), .next(next),
                                      .x(xb), .y(yb), .last(last_b));

  always #5 clk = ~clk;

  int ex_s, ey_s, ex_b, ey_b;

  task automatic compare();
    checks++;
    if (int'(xs) != ex_s || int'(ys) != ey_s || last_s != (ex_s == 6 && ey_s == 4)) begin
      failures++;
      if (failures < 10) $display("FAIL 7x5 got (%0d,%0d,%0b) expected (%0d,%0d)", xs, ys, last_s, ex_s, ey_s);
    end
    checks++;
    if (int'(xb) != ex_b || int'(yb) != ey_b || last_b != (ex_b == 89 && ey_b == 89)) begin
      failures++;
      if (failures < 10) $display("FAIL 90x90 got (%0d,%0d,%0b) expected (%0d,%0d)", xb, yb, last_b, ex_b, ey_b);
    end
  endtask

  task automatic step(input logic do_next, input logic do_reset);
    next  = do_next;
    reset = do_reset;
    @(posedge clk);
    #1;
    if (do_reset) begin
      ex_s = 0; ey_s = 0; ex_b = 0; ey_b = 0;
    end else if (do_next) begin
      ex_s++;
      if (ex_s == 7) begin ex_s = 0; ey_s++; if (ey_s == 5) begin ey_s = 0; wraps_s++; end end
      ex_b++;
      if (ex_b == 90) begin ex_b = 0; ey_b++; if (ey_b == 90) begin ey_b = 0; wraps_b++; end end
    end else begin
      holds++;
    end
    compare();
  endtask

  initial begin
    next = 1'b0;
    reset = 1'b1;
    ex_s = 0; ey_s = 0; ex_b = 0; ey_b = 0;
    step(1'b0, 1'b1);
    // Random stepping, long enough for the small generator to wrap often.
    for (int i = 0; i < 300; i++) step(1'($urandom % 4 != 0), 1'b0);
    // Reset wins over next.
    step(1'b1, 1'b1);
    // Exactly W*H steps bring the 90 x 90 generator back to (0, 0).
    for (int i = 0; i < 8100; i++) begin
      if (i == 8099) begin
        checks++;
        if (!last_b) begin failures++; $display("FAIL last not high before wrap"); end
      end
      step(1'b1, 1'b0);
    end
    checks++;
    if (xb != 0 || yb != 0 || wraps_b != 1) begin
      failures++;
      $display("FAIL 90x90 did not wrap after 8100 steps (%0d,%0d) wraps=%0d", xb, yb, wraps_b);
    end
    // Reset in mid-sequence.
    for (int i = 0; i < 50; i++) step(1'b1, 1'b0);
    step(1'b0, 1'b1);
    for (int i = 0; i < 20; i++) step(1'($urandom % 2), 1'b0);
    checks++;
    if (wraps_s == 0 || holds == 0) begin
      failures++;
      $display("FAIL coverage wraps=%0d holds=%0d", wraps_s, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
