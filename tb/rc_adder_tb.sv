// rc_adder_tb: self-checking test of the ripple-carry adder.
//
// A 5-bit instance is checked exhaustively (all 1024 operand pairs) and the
// 13-bit instance used by the mapper with 20000 random pairs plus the corner
// cases, against the '+' operator. Both the sum and the carry out are
// compared. The adder is combinational, so every vector is checked 1 ns
// after it is applied.
module rc_adder_tb;

  int checks = 0;
  int failures = 0;

  logic [4:0]  a5, b5, s5;
  logic        c5;
  logic [12:0] a13, b13, s13;
  logic        c13;

  rc_adder #(.WIDTH(5))  dut5  (.a(a5),  .b(b5),  .sum(s5),  .cout(c5));
  rc_adder               dut13 (.a(a13), .b(b13), .sum(s13), .cout(c13));

  task automatic check13(input logic [12:0] a, input logic [12:0] b);
    logic [13:0] ref_sum;
    a13 = a; b13 = b;
    #1;
    ref_sum = {1'b0, a} + {1'b0, b};
    checks++;
    if ({c13, s13} !== ref_sum) begin
      failures++;
      if (failures < 10) $display("FAIL 13-bit %0d + %0d: got %0d cout %0b", a, b, s13, c13);
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        logic [5:0] ref5;
        a5 = 5'(i); b5 = 5'(j);
        #1;
        ref5 = 6'(i + j);
        checks++;
        if ({c5, s5} !== ref5) begin
          failures++;
          if (failures < 10) $display("FAIL 5-bit %0d + %0d: got %0d cout %0b", i, j, s5, c5);
        end
      end
    end
    check13(13'h0000, 13'h0000);
    check13(13'h1fff, 13'h0001);
    check13(13'h1fff, 13'h1fff);
    check13(13'h0aaa, 13'h1555);
    for (int k = 0; k < 20000; k++) check13(13'($urandom), 13'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
