// jitq_strided_map: the pim-jitq-strided weight placement, from the logical
// position of a weight to its physical place in the pseudo-channel.
//
// The weight matrix is cut into 16 x 16 tiles, so that every row and every
// column of a tile is one MX block. A tile lives entirely in the bank pair of
// one PIM unit, so neither row nor column quantization needs data from
// another bank pair. Inside the tile the elements are taken row-major; the
// first 128 go to the even bank and the last 128 to the odd bank, one element
// per 256-bit word, always in the same lane. The 16 lanes of a word carry
// the same element of 16 different tiles, so an MX block is reduced lane by
// lane without any cross-lane operation. Consecutive tiles fill the lanes,
// then the PIM units, then the next tile group of rows:
//   lane = t mod 16, unit = (t / 16) mod UNITS, group = t / (16 * UNITS).
// A 1 KB row holds 32 elements, so a tile row of 16 elements (a row block)
// sits in one DRAM row while a tile column (a column block) spans four rows
// of each bank. The per-group region layout (input, row-quantized and
// column-quantized outputs, shared exponents) is this design's choice and
// is defined in jitq_pkg. Purely combinational.
module jitq_strided_map
  import jitq_pkg::*;
#(
  parameter int unsigned UNITS  = 8,
  parameter int unsigned TILE_W = 16
) (
  input  logic [TILE_W-1:0]      tile,    // global tile number
  input  region_e                region,
  input  logic [7:0]             elem,    // row-major element index, or {mode, block} for REG_SHX
  output logic [UNIT_AW-1:0]     unit,
  output logic [$clog2(LANES)-1:0] lane,
  output logic [ROW_AW-1:0]      group,
  output bank_addr_t             addr
);

  localparam int unsigned LW = $clog2(LANES);

  logic [TILE_W-1:0] slot;

  assign lane  = tile[LW-1:0];
  assign slot  = tile >> LW;
  assign unit  = UNIT_AW'(slot % TILE_W'(UNITS));
  assign group = ROW_AW'(slot / TILE_W'(UNITS));
  assign addr  = strided_addr(group, region, elem);

endmodule
