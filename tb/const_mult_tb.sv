// const_mult_tb: self-checking test of the constant multiplier.
//
// Three instances: K = 90 and K = 80 with a 7-bit operand and 13-bit product
// (the widths of the 90 x 90 and 80 x 80 mappers), and K = 75. Every
// operand value 0..127 is applied and the product compared, modulo 2**13,
// with K * a computed by the testbench. Combinational: checked 1 ns after
// each input change.
module const_mult_tb;

  int checks = 0;
  int failures = 0;

  logic [6:0]  a;
  logic [12:0] p90, p80, p75;

  const_mult                          dut90 (.a(a), .prod(p90));
  const_mult #(.K(80), .IW(7), .OW(13)) dut80 (.a(a), .prod(p80));
  const_mult #(.K(75), .IW(7), .OW(13)) dut75 (.a(a), .prod(p75));

  task automatic cmp(input int k, input logic [12:0] got);
    int expected;
    expected = (k * int'(a)) % 8192;
    checks++;
    if (int'(got) != expected) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d: got %0d expected %0d", k, a, got, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < 128; i++) begin
      a = 7'(i);
      #1;
      cmp(90, p90);
      cmp(80, p80);
      cmp(75, p75);
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
