// rc_adder: WIDTH-bit ripple-carry adder.
//
// sum = a + b (modulo 2**WIDTH), with the carry out of the top stage on cout.
// The adder is a chain of full adders, stage i taking the carry of stage i-1,
// the adder structure the mapper's power argument rests on: activity on the
// low operand bits ripples through every stage above it. Purely
// combinational; delay grows linearly with WIDTH.
//
// In the mapper the operands are the multiplier product and the
// concatenation x & y(log2 n - 1 .. 0) (or x alone for the row-major rows),
// and the operand ranges keep the sum inside WIDTH bits. The full-adder
// chain is written out explicitly rather than with the '+' operator so that
// the ripple structure is what gets built.
module rc_adder #(
  parameter int unsigned WIDTH = 13
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    assign sum[i]     = a[i] ^ b[i] ^ carry[i];
    assign carry[i+1] = (a[i] & b[i]) | (carry[i] & (a[i] ^ b[i]));
  end

  assign cout = carry[WIDTH];

endmodule
