// hist_counter: histogram elements counter (HS).
//
// Counts how many of a region's stored events survived outlier removal: the
// newest event (keep_p) plus every older ring buffer entry flagged in keep.
// The count is the value of this region's histogram bin for the current event.
// Purely combinational. Counting the kept entries is the source's description
// of the histogram update; counting the newest event as well is this design's
// choice.
module hist_counter #(
  parameter int unsigned HS    = 16,
  parameter int unsigned CNT_W = $clog2(HS + 2)
) (
  input  logic             keep_p,
  input  logic [HS-1:0]    keep,
  output logic [CNT_W-1:0] count
);
  always_comb begin
    count = CNT_W'(keep_p);
    for (int i = 0; i < int'(HS); i++)
      count = count + CNT_W'(keep[i]);
  end
endmodule
