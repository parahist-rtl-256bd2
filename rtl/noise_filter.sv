// noise_filter: background activity filter of stage 2 with its control unit.
//
// For the 3x3 pixels around an event (the event's own pixel included) the
// unit compares tsc - tsp with the noise threshold dtn, using the same
// modular age as the decompression unit: age = (tsc - tsp) mod 2^W_TS. A
// neighbour with at least one stored event (size != 0) and age < dtn is
// "recent". The control unit passes the event when any neighbour is recent;
// otherwise the event is noise and produces no histogram. Purely
// combinational; lines are ordered (dy+1)*3 + (dx+1). The comparison
// tsc - tsp < dtn over the 3x3 neighbourhood is the source's; reducing the
// nine results with an OR is this design's reading of the control unit.
module noise_filter #(
  parameter int unsigned LINE_W = 72,
  parameter int unsigned HS     = 16,
  parameter int unsigned W_DT   = 4,
  parameter int unsigned SIZE_W = 4,
  parameter int unsigned TIME_W = 32
) (
  input  logic [LINE_W-1:0] line_in [9],
  input  logic [8:0]        line_valid,
  input  logic [TIME_W-1:0] tsc,
  input  logic [TIME_W-1:0] dtn,
  output logic [8:0]        recent,
  output logic              pass
);
  localparam int unsigned W_TS = LINE_W - HS * W_DT - SIZE_W;
  localparam int unsigned EW   = (W_TS < TIME_W) ? W_TS : TIME_W;

  logic [EW-1:0] age [9];

  always_comb begin
    for (int k = 0; k < 9; k++) begin
      age[k]    = tsc[EW-1:0] - line_in[k][HS*W_DT +: EW];
      recent[k] = line_valid[k] && (line_in[k][LINE_W-1 -: SIZE_W] != '0) &&
                  (TIME_W'(age[k]) < dtn);
    end
    pass = |recent;
  end
endmodule
