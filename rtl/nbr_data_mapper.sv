// nbr_data_mapper: neighbourhood data mapper (NDM).
//
// The 64 bank outputs arrive in bank order; the processing lanes of stages
// 2-4 want them in neighbourhood order. Region k = (dy+R)*(2R+1) + (dx+R),
// for offsets dx, dy in -R..R, takes its line from bank
// {(y+dy)[2:0], (x+dx)[2:0]}: a barrel rotation by the event's low coordinate
// bits. A region whose bank was not read (neighbour off the sensor) gets an
// all-zero line, i.e. an empty ring buffer, and region_valid low. Purely
// combinational. The block is named in the source architecture; the rotation
// is this design's way of doing what it names.
module nbr_data_mapper #(
  parameter int unsigned R      = 1,
  parameter int unsigned LINE_W = 72,
  parameter int unsigned NR     = (2 * R + 1) * (2 * R + 1)
) (
  input  logic [2:0]                       x_lo,
  input  logic [2:0]                       y_lo,
  input  logic [LINE_W-1:0]                bank_data  [parahist_pkg::N_BANKS],
  input  logic [parahist_pkg::N_BANKS-1:0] bank_valid,
  output logic [LINE_W-1:0]                region_line [NR],
  output logic [NR-1:0]                    region_valid
);
  import parahist_pkg::*;

  localparam int unsigned D = 2 * R + 1;

  for (genvar k = 0; k < NR; k++) begin : g_region
    localparam int DX = int'(k % D) - int'(R);
    localparam int DY = int'(k / D) - int'(R);
    logic [2:0] bx, by;
    logic [5:0] bank;
    always_comb begin
      bx   = 3'(int'(x_lo) + DX);
      by   = 3'(int'(y_lo) + DY);
      bank = {by, bx};
      region_valid[k] = bank_valid[bank];
      region_line[k]  = bank_valid[bank] ? bank_data[bank] : '0;
    end
  end
endmodule
