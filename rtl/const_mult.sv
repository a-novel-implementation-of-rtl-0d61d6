// const_mult: multiplier by a constant K.
//
// prod = K * a, truncated to OW bits. K is a parameter (in the mapper it is
// the array width W), so the multiplier is built as a sum of copies of the
// operand shifted left by the positions of the one-bits of K; only those
// partial products exist in hardware. Purely combinational.
//
// The operand width IW and product width OW follow the restricted operand
// range: for the 90-wide array the operand is 7 bits and, since
// 90 * 89 < 2**13, the product is 13 bits. OW must be wide enough for
// K * (largest operand actually applied); bits above OW are dropped.
// A constant multiplier with these widths is what the mapper calls for; the
// shift-and-add structure is this implementation's choice.
module const_mult #(
  parameter int unsigned K  = 90,
  parameter int unsigned IW = 7,
  parameter int unsigned OW = 13
) (
  input  logic [IW-1:0] a,
  output logic [OW-1:0] prod
);

  localparam int unsigned KW = (K > 1) ? $clog2(K + 1) : 1;
  localparam logic [KW-1:0] KBITS = KW'(K);

  always_comb begin
    prod = '0;
    for (int unsigned i = 0; i < KW; i++) begin
      if (KBITS[i]) prod = prod + (OW'(a) << i);
    end
  end

endmodule
