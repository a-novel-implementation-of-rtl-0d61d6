// sym_addr_gen: symbolic address generator.
//
// Produces the symbolic address of the next array element to access as its
// index pair (x, y), 0 <= x < W, 0 <= y < H. The interface is the one of the
// address generator model: 'reset' restarts the sequence and 'next' steps it.
// The sequence itself is application specific; this generator walks the
// array in raster order (x fastest, then y) and wraps from (W-1, H-1) back
// to (0, 0), with 'last' high while the final element is presented.
//
// Timing: x and y are registers. 'reset' is synchronous and active high and
// has priority over 'next'; with 'next' high at a rising edge the indices
// step once. The output address for the current indices is valid for the
// whole cycle, so a combinational converter can follow directly.
module sym_addr_gen
  import tile_map_pkg::*;
#(
  parameter int unsigned W  = DEF_W,
  parameter int unsigned H  = DEF_H,
  parameter int unsigned XW = (W > 1) ? $clog2(W) : 1,
  parameter int unsigned YW = (H > 1) ? $clog2(H) : 1
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          next,
  output logic [XW-1:0] x,
  output logic [YW-1:0] y,
  output logic          last
);

  localparam logic [XW-1:0] XMAX = XW'(W - 1);
  localparam logic [YW-1:0] YMAX = YW'(H - 1);

  logic x_end, y_end;
  assign x_end = (x == XMAX);
  assign y_end = (y == YMAX);
  assign last  = x_end && y_end;

  always_ff @(posedge clk) begin
    if (reset) begin
      x <= '0;
      y <= '0;
    end else if (next) begin
      if (x_end) begin
        x <= '0;
        y <= y_end ? '0 : y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

  // The indices never leave the array.
  a_in_range: assert property (@(posedge clk) disable iff (reset)
                               (x <= XMAX) && (y <= YMAX))
    else $error("sym_addr_gen: index out of range x=%0d y=%0d", x, y);

endmodule
