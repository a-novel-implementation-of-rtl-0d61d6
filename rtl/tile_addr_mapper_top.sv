// tile_addr_mapper_top: complete address generator for one W x H data array
// stored with 4D tile-based layout.
//
// Two stages, as in the functional split of the address generator: a
// symbolic address generator yields array indices (x, y) and a symbolic to
// physical address converter turns them into the linear memory address.
// The physical address is also given split into the memory row
// (log2(P) upper bits) and column (log2(Q) lower bits) for the memory,
// which is not part of this design.
//
// Interface: 'reset' (synchronous, active high) restarts at (0, 0); each
// cycle with 'next' high advances one element in raster order. x, y come
// from registers; phys_addr, mem_row, mem_col and region_row_major are
// combinational from them and valid in the same cycle as x, y.
// region_row_major is high while the indices fall in the last H mod n rows,
// which are laid out row-major.
//
// The generator/converter split and the row/column address split are those
// of the published address generator model; the synchronous reset, the
// raster access order and the unregistered address output are this
// design's choices.
//
// Defaults: 90 x 90 array, 8 x 4 tiles, 256 x 32 word memory. The mapper is
// built for one array size: another array needs another instance.
module tile_addr_mapper_top
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
  parameter int unsigned RW = $clog2(P),
  parameter int unsigned CW = $clog2(Q)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             next,
  output logic [XW-1:0]    x,
  output logic [YW-1:0]    y,
  output logic             last,
  output logic [RW+CW-1:0] phys_addr,
  output logic [RW-1:0]    mem_row,
  output logic [CW-1:0]    mem_col,
  output logic             region_row_major
);

  region_e region;

  sym_addr_gen #(.W(W), .H(H), .XW(XW), .YW(YW)) u_gen (
    .clk  (clk),
    .reset(reset),
    .next (next),
    .x    (x),
    .y    (y),
    .last (last)
  );

  addr_converter #(
    .W(W), .H(H), .M(M), .N(N), .P(P), .Q(Q),
    .XW(XW), .YW(YW), .AW(RW + CW)
  ) u_conv (
    .x     (x),
    .y     (y),
    .addr  (phys_addr),
    .region(region)
  );

  assign mem_row          = phys_addr[RW+CW-1:CW];
  assign mem_col          = phys_addr[CW-1:0];
  assign region_row_major = (region == REGION_ROW_MAJOR);

endmodule
