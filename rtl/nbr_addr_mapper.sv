// nbr_addr_mapper: neighbourhood address mapper (NAM).
//
// For an event at pixel (x, y) and a search radius R, the (2R+1)x(2R+1)
// neighbourhood is spread over distinct RAM banks because 2R+1 <= 8. For each
// of the 64 banks this block works out which neighbour offset (dx, dy) lands
// in it: dx is the bank column minus x[2:0], taken modulo 8 into -4..3, and
// likewise dy. If both offsets are within the radius and the neighbour pixel
// lies on the sensor, the bank is enabled and given the line address of that
// neighbour (through an addr_demapper per bank); otherwise it stays idle.
// Purely combinational; its outputs drive the banks' read ports directly. The
// parallel neighbourhood read follows the source architecture; the offset
// arithmetic is this design's.
module nbr_addr_mapper #(
  parameter int unsigned R        = 1,
  parameter int unsigned SENSOR_W = 240,
  parameter int unsigned SENSOR_H = 180,
  parameter int unsigned LINE_AW  = $clog2(((SENSOR_W + 7) / 8) * ((SENSOR_H + 7) / 8))
) (
  input  logic                          ev_valid,
  input  logic [parahist_pkg::X_W-1:0]  x,
  input  logic [parahist_pkg::Y_W-1:0]  y,
  output logic [parahist_pkg::N_BANKS-1:0] rd_en,
  output logic [LINE_AW-1:0]            rd_addr [parahist_pkg::N_BANKS]
);
  import parahist_pkg::*;

  initial begin
    if (R < 1 || 2 * R + 1 > BANK_DIM)
      $error("nbr_addr_mapper: radius %0d does not fit the 8x8 bank grid", R);
  end

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    localparam int BX = b % BANK_DIM;
    localparam int BY = b / BANK_DIM;

    logic signed [3:0]   dx, dy;
    logic [X_W-1:0]      nx;
    logic [Y_W-1:0]      ny;
    logic [5:0]          bank_unused;
    logic                on_sensor, near, x_ok, y_ok;

    always_comb begin
      // offset of this bank's column/row from the event, wrapped into -4..3
      dx = 4'(signed'({1'b0, 3'(BX - int'(x[2:0]))}));
      dy = 4'(signed'({1'b0, 3'(BY - int'(y[2:0]))}));
      if (dx > 3) dx = dx - 4'sd8;
      if (dy > 3) dy = dy - 4'sd8;
      near = (int'(dx) >= -int'(R)) && (int'(dx) <= int'(R)) &&
             (int'(dy) >= -int'(R)) && (int'(dy) <= int'(R));
      // neighbour coordinates and whether they fall on the sensor
      x_ok = (int'(x) + int'(dx) >= 0) && (int'(x) + int'(dx) < int'(SENSOR_W));
      y_ok = (int'(y) + int'(dy) >= 0) && (int'(y) + int'(dy) < int'(SENSOR_H));
      nx   = X_W'(int'(x) + int'(dx));
      ny   = Y_W'(int'(y) + int'(dy));
    end

    addr_demapper #(
      .SENSOR_W(SENSOR_W), .SENSOR_H(SENSOR_H), .LINE_AW(LINE_AW)
    ) u_adm (
      .x(nx), .y(ny), .bank(bank_unused), .line_addr(rd_addr[b]), .in_range(on_sensor)
    );

    assign rd_en[b] = ev_valid && near && x_ok && y_ok && on_sensor;
  end
endmodule
