// prefix_adder: radix-4 Sklansky parallel prefix adder (PA).
//
// Produces all inclusive prefix sums sum[i] = in[0] + ... + in[i] of N
// time differences at once. The network has ceil(log4 N) levels. Going into
// level l every element already holds the prefix sum inside its block of 4^l
// elements; level l groups four such blocks into one of 4^(l+1) and adds to
// every element of the j-th sub-block the totals (last elements) of the j
// sub-blocks before it, so a lane adds at most three fan-out values per level.
// For N = 16 that is two levels. Purely combinational; outputs are
// OUT_W bits wide, enough for N maximal inputs. The radix-4 Sklansky choice
// is the source's; the level structure above is this design's rendering of
// it.
module prefix_adder #(
  parameter int unsigned N     = 16,
  parameter int unsigned IN_W  = 4,
  parameter int unsigned OUT_W = IN_W + $clog2(N)
) (
  input  logic [IN_W-1:0]  din  [N],
  output logic [OUT_W-1:0] dout [N]
);
  // number of radix-4 levels
  function automatic int unsigned levels(input int unsigned n);
    int unsigned l, span;
    l = 0;
    span = 1;
    while (span < n) begin
      span = span * 4;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned L = levels(N);

  for (genvar l = 0; l < L; l++) begin : g_level
    localparam int unsigned SB = 4 ** l;      // sub-block size
    localparam int unsigned BB = 4 * SB;      // block size after this level
    logic [OUT_W-1:0] prev [N];               // input of this level
    logic [OUT_W-1:0] lvl  [N];               // output of this level
    for (genvar i = 0; i < N; i++) begin : g_lane
      localparam int unsigned POS  = i % BB;
      localparam int unsigned J    = POS / SB; // sub-block of lane i
      localparam int unsigned BASE = i - POS;
      if (l == 0) begin : g_first
        assign prev[i] = OUT_W'(din[i]);
      end else begin : g_next
        assign prev[i] = g_level[l-1].lvl[i];
      end
      logic [OUT_W-1:0] acc;
      always_comb begin
        acc = prev[i];
        for (int unsigned k = 1; k <= J; k++)
          acc = acc + prev[BASE + k * SB - 1];
      end
      assign lvl[i] = acc;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out
    if (L == 0) begin : g_pass
      assign dout[i] = OUT_W'(din[i]);
    end else begin : g_sum
      assign dout[i] = g_level[L-1].lvl[i];
    end
  end
endmodule
