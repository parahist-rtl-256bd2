// decompress_unit: timestamp decompression unit (DU).
//
// A ring buffer stores only the low W_TS bits of the newest event time (tsp)
// and, for older events, the differences between consecutive event times.
// This unit rebuilds absolute times. First the full previous timestamp is
// recovered from the current time tsc: age = (tsc - tsp) mod 2^W_TS and
// tsp_full = tsc - age, which is exact as long as the pixel's newest event is
// less than 2^W_TS time units old. Then each older event time is
// ts[i] = tsp_full - sum[i], where sum[i] is the prefix sum of the stored
// differences from the prefix adder. Results are signed, two bits wider than
// the time base, so that times before zero stay ordered. Purely
// combinational. Subtracting the prefix sums from the previous timestamp is
// the source's method; the modular recovery of tsp_full from a truncated
// field is this design's reading of how a W_TS-bit field is used.
module decompress_unit #(
  parameter int unsigned HS     = 16,
  parameter int unsigned W_TS   = 4,
  parameter int unsigned SUM_W  = 8,
  parameter int unsigned TIME_W = 32
) (
  input  logic [TIME_W-1:0]         tsc,
  input  logic [W_TS-1:0]           tsp,
  input  logic [SUM_W-1:0]          sums     [HS],
  output logic [TIME_W-1:0]         age,
  output logic signed [TIME_W+1:0]  tsp_full,
  output logic signed [TIME_W+1:0]  ts       [HS]
);
  localparam int unsigned EW = (W_TS < TIME_W) ? W_TS : TIME_W;

  logic [EW-1:0] age_low;

  always_comb begin
    age_low  = tsc[EW-1:0] - tsp[EW-1:0];
    age      = TIME_W'(age_low);
    tsp_full = $signed({2'b00, tsc}) - $signed({2'b00, age});
    for (int i = 0; i < int'(HS); i++)
      ts[i] = tsp_full - $signed((TIME_W + 2)'(sums[i]));
  end
endmodule
