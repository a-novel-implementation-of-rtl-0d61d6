// tile_map_pkg: constants and types shared by the tile-based address mapper.
//
// The default sizes are the worked configuration of the general case: a
// 90 x 90 data array laid out in 8 x 4 tiles (m = 8 wide, n = 4 high) in a
// memory of 256 rows by 32 words. The tile holds m * n = 32 words, the size
// of one memory row, and n is a power of two, which is what lets the tiled
// mapping be reduced to one constant multiplication and one addition.
// region_e names the two halves of the array: rows y < H' (H' = H - H mod n)
// are tiled, the remaining H mod n rows are laid out row-major.
package tile_map_pkg;

  localparam int unsigned DEF_W = 90;   // array width  (x range 0..W-1)
  localparam int unsigned DEF_H = 90;   // array height (y range 0..H-1)
  localparam int unsigned DEF_M = 8;    // tile width
  localparam int unsigned DEF_N = 4;    // tile height, a power of two
  localparam int unsigned DEF_P = 256;  // memory rows
  localparam int unsigned DEF_Q = 32;   // memory columns (words per row)

  // Which mapping an index pair is converted with.
  typedef enum logic {
    REGION_TILED     = 1'b0,  // region one: 4D tile-based f_rc (Equation 5)
    REGION_ROW_MAJOR = 1'b1   // region two: row-major W*y + x
  } region_e;

endpackage
