// region_detect: selects between the tiled rows and the row-major rows.
//
// An H-high array tiled with n-high tiles (n a power of two) has
// H' = H - (H mod n) rows that fill whole tile rows (region one) and
// H mod n leftover rows (region two). in_region2 is high when y >= H'.
//
// No comparator is needed. H' is a multiple of n, and every y in region two
// lies in H' .. H'+n-1, so with its log2(n) low bits cleared it equals H'.
// Within the legal range 0 <= y < H this is the same as asking whether y has
// a one wherever H' has one, above bit log2(n): a bit-wise superset of H'
// is never below H', and no y < H' is such a superset. The detector is
// therefore a single AND of the bits of y at the one-positions of H'
// (for H = 90, n = 4, H' = 88 = 1011000b, the AND of y(6), y(4), y(3)).
// When H mod n = 0 no y in range reaches H' and the output stays low.
// The input is y with its log2(n) low bits already dropped, since they
// never matter. Purely combinational. Inputs with y >= H are outside the
// contract.
module region_detect #(
  parameter int unsigned H  = 90,
  parameter int unsigned N  = 4,
  parameter int unsigned YW = (H > 1) ? $clog2(H) : 1
) (
  input  logic [YW-$clog2(N)-1:0] y_hi,   // y[YW-1:log2(N)]
  output logic          in_region2
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned HP   = H - (H % N);      // H'
  localparam logic [YW-1:0] HP_BITS = YW'(HP);

  if (N != (1 << LOGN)) begin : g_bad_n
    $error("region_detect: N must be a power of two");
  end
  if (LOGN >= YW) begin : g_bad_yw
    $error("region_detect: the tile height must be below the array height range");
  end

  // Upper bits of y that must be one; all other bits are don't-care.
  localparam logic [YW-LOGN-1:0] MASK = HP_BITS[YW-1:LOGN];

  assign in_region2 = &(y_hi | ~MASK);

endmodule
