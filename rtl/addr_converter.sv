// addr_converter: symbolic to physical address converter for 4D tile-based
// mapping with tiles ordered row-major and words inside a tile ordered
// column-major (f_rc).
//
// With W x H array, m x n tiles, the mapping is
//   f_rc(x,y) = (y - y mod n)W + (x - x mod m)n + (x mod m)n + y mod n
//             = W(y - y mod n) + x*n + y mod n.
// When n is a power of two, y mod n is the log2(n) low bits of y,
// y - y mod n is y with those bits cleared, and x*n + y mod n is just the
// concatenation {x, y[log2n-1:0]}. What is left is one constant
// multiplication by W and one addition, the same cost as row-major W*y + x.
//
// If H is not a multiple of n, the last H mod n rows (y >= H' = H - H mod n)
// do not fill a tile row; they are mapped row-major, W*y + x, so they follow
// the tiled region in memory with no gap. Both mappings share the one
// multiplier and one adder through two 2:1 multiplexors steered by
// region_detect:
//   sel = 0 (tiled):     adder operand {x, y[1:0]},  multiplier operand {y[6:2], 2'b00}
//   sel = 1 (row-major): adder operand {2'b00, x},   multiplier operand y
// (bit positions shown for n = 4, 7-bit x and y). When H mod n = 0 there is
// no region two: the multiplexors and the detector are left out, and since
// the multiplier operand then always ends in log2(n) zeros, only the upper
// bits of y are multiplied and the lowest log2(n) adder stages are removed,
// y mod n going straight to the address LSBs.
//
// m does not appear in the simplified equation; it is kept as a parameter
// to check that a tile (m * n words) is one memory row (Q words).
// addr has log2(P*Q) bits; the row address is its log2(P) upper bits and the
// column address its log2(Q) lower bits. Purely combinational: addr follows
// x and y after the multiplier and adder delay. Inputs must satisfy
// x < W and y < H.
//
// The decomposition, widths and multiplexor inputs follow the published
// datapath; the ripple-carry adder and shift-and-add constant multiplier
// are the chosen realisations of the adder and multiplier.
module addr_converter
  import tile_map_pkg::*;
#(
  parameter int unsigned W  = DEF_W,
  parameter int unsigned H  = DEF_H,
  parameter int unsigned M  = DEF_M,
  parameter int unsigned N  = DEF_N,
  parameter int unsigned P  = DEF_P,
  parameter int unsigned Q  = DEF_Q,
  parameter int unsigned XW = (W > 1) ? $clog2(W) : 1,
  parameter int unsigned YW = (H > 1) ? $clog2(H) : 1,
  parameter int unsigned AW = $clog2(P * Q)
) (
  input  logic [XW-1:0] x,
  input  logic [YW-1:0] y,
  output logic [AW-1:0] addr,
  output region_e       region
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned OPW  = XW + LOGN;   // width of {x, y mod n}

  if (N != (1 << LOGN)) begin : g_bad_n
    $error("addr_converter: tile height N must be a power of two");
  end
  if (M * N != Q) begin : g_bad_tile
    $error("addr_converter: a tile (M*N words) must fill one memory row (Q words)");
  end
  if (W * H > P * Q) begin : g_bad_fit
    $error("addr_converter: the W x H array does not fit in P x Q memory words");
  end
  if (OPW > AW) begin : g_bad_aw
    $error("addr_converter: address width too small for {x, y mod n}");
  end

  logic sel;
  logic cout_unused;

  if ((H % N) != 0) begin : g_general
    logic [OPW-1:0] add_op;     // 9 bits for the defaults
    logic [YW-1:0]  mul_op;     // 7 bits
    logic [AW-1:0]  prod;       // 13 bits

    region_detect #(.H(H), .N(N), .YW(YW)) u_region (
      .y_hi      (y[YW-1:LOGN]),
      .in_region2(sel)
    );

    // Multiplexors of the shared datapath: 0 = tiled, 1 = row-major.
    assign add_op = sel ? OPW'(x) : {x, y[LOGN-1:0]};
    assign mul_op = sel ? y       : {y[YW-1:LOGN], {LOGN{1'b0}}};

    const_mult #(.K(W), .IW(YW), .OW(AW)) u_mult (
      .a   (mul_op),
      .prod(prod)
    );

    rc_adder #(.WIDTH(AW)) u_add (
      .a   (AW'(add_op)),
      .b   (prod),
      .sum (addr),
      .cout(cout_unused)
    );
  end else begin : g_special
    // Every row is tiled. The multiplier operand always has log2(n) zero
    // low bits, so the product has them too: multiply only the upper bits
    // of y, pass y mod n straight to the low address bits and drop the
    // lowest log2(n) adder stages.
    logic [AW-LOGN-1:0] prod_hi;
    logic [AW-LOGN-1:0] sum_hi;

    assign sel = 1'b0;

    const_mult #(.K(W), .IW(YW - LOGN), .OW(AW - LOGN)) u_mult (
      .a   (y[YW-1:LOGN]),
      .prod(prod_hi)
    );

    rc_adder #(.WIDTH(AW - LOGN)) u_add (
      .a   ((AW - LOGN)'(x)),
      .b   (prod_hi),
      .sum (sum_hi),
      .cout(cout_unused)
    );

    assign addr = {sum_hi, y[LOGN-1:0]};
  end

  assign region = sel ? REGION_ROW_MAJOR : REGION_TILED;

endmodule
