// addr_demapper: pixel coordinate to RAM bank and line address (ADM).
//
// The pixel array is spread over an 8x8 grid of RAM banks: the three least
// significant bits of x and of y select the bank, so any 8x8 window of pixels
// touches every bank exactly once and can be read in one cycle. The remaining
// coordinate bits select the line inside the bank, row-major over the
// ceil(W/8) x ceil(H/8) grid of 8x8 tiles. `in_range` tells whether the
// coordinate lies on the sensor. Purely combinational. The bank selection by
// the low three bits follows the source architecture; the line numbering and
// the default 240x180 sensor are this design's choices.
module addr_demapper #(
  parameter int unsigned SENSOR_W = 240,
  parameter int unsigned SENSOR_H = 180,
  parameter int unsigned LINE_AW  = $clog2(((SENSOR_W + 7) / 8) * ((SENSOR_H + 7) / 8))
) (
  input  logic [parahist_pkg::X_W-1:0] x,
  input  logic [parahist_pkg::Y_W-1:0] y,
  output logic [5:0]                   bank,      // {y[2:0], x[2:0]}
  output logic [LINE_AW-1:0]           line_addr,
  output logic                         in_range
);
  import parahist_pkg::*;

  localparam int unsigned TILES_X = (SENSOR_W + BANK_DIM - 1) / BANK_DIM;

  logic [X_W-BANK_BITS-1:0] tile_x;
  logic [Y_W-BANK_BITS-1:0] tile_y;

  always_comb begin
    tile_x    = x[X_W-1:BANK_BITS];
    tile_y    = y[Y_W-1:BANK_BITS];
    bank      = {y[BANK_BITS-1:0], x[BANK_BITS-1:0]};
    line_addr = LINE_AW'(32'(tile_y) * TILES_X + 32'(tile_x));
    in_range  = (32'(x) < SENSOR_W) && (32'(y) < SENSOR_H);
  end
endmodule
