// region_unit: one processing lane of stages 3 and 4 for one neighbour region.
//
// Unpacks a memory line (most significant first: size, tsp, dt[0] .. dt[HS-1],
// with W_TS = LINE_W - HS*W_DT - SIZE_W bits left for tsp), then chains the
// prefix adder (PA), the decompression unit (DU), the comparison and shift
// unit (CS) and the histogram elements counter (HS). Outputs are the region's
// histogram bin and the shifted line that stage 5 writes back when this region
// holds the event itself. Purely combinational.
module region_unit #(
  parameter int unsigned LINE_W = 72,
  parameter int unsigned HS     = 16,
  parameter int unsigned W_DT   = 4,
  parameter int unsigned SIZE_W = 4,
  parameter int unsigned TIME_W = 32,
  parameter int unsigned CNT_W  = $clog2(HS + 2)
) (
  input  logic              line_valid,
  input  logic [LINE_W-1:0] line_in,
  input  logic [TIME_W-1:0] tsc,
  input  logic [TIME_W-1:0] threshold,
  output logic [CNT_W-1:0]  count,
  output logic [LINE_W-1:0] line_out
);
  localparam int unsigned W_TS  = LINE_W - HS * W_DT - SIZE_W;
  localparam int unsigned SUM_W = W_DT + $clog2(HS + 1);

  logic [SIZE_W-1:0]        size, new_size;
  logic [W_TS-1:0]          tsp, new_tsp;
  logic [W_DT-1:0]          dt [HS], new_dt [HS];
  logic [SUM_W-1:0]         sums [HS];
  logic [TIME_W-1:0]        age;
  logic signed [TIME_W+1:0] tsp_full;
  logic signed [TIME_W+1:0] ts [HS];
  logic                     keep_p;
  logic [HS-1:0]            keep;

  initial begin
    if (LINE_W <= HS * W_DT + SIZE_W)
      $error("region_unit: no bits left for the timestamp field");
  end

  always_comb begin
    size = line_in[LINE_W-1 -: SIZE_W];
    tsp  = line_in[HS*W_DT +: W_TS];
    for (int i = 0; i < int'(HS); i++)
      dt[i] = line_in[(HS-1-i)*W_DT +: W_DT];
  end

  prefix_adder #(.N(HS), .IN_W(W_DT), .OUT_W(SUM_W)) u_pa (.din(dt), .dout(sums));

  decompress_unit #(.HS(HS), .W_TS(W_TS), .SUM_W(SUM_W), .TIME_W(TIME_W)) u_du (
    .tsc(tsc), .tsp(tsp), .sums(sums), .age(age), .tsp_full(tsp_full), .ts(ts)
  );

  compare_shift #(.HS(HS), .W_DT(W_DT), .W_TS(W_TS), .SIZE_W(SIZE_W), .TIME_W(TIME_W)) u_cs (
    .line_valid(line_valid), .tsc(tsc), .threshold(threshold), .size(size), .age(age),
    .tsp_full(tsp_full), .ts(ts), .dt(dt), .keep_p(keep_p), .keep(keep),
    .new_size(new_size), .new_tsp(new_tsp), .new_dt(new_dt)
  );

  hist_counter #(.HS(HS), .CNT_W(CNT_W)) u_hs (.keep_p(keep_p), .keep(keep), .count(count));

  always_comb begin
    line_out = '0;
    line_out[LINE_W-1 -: SIZE_W] = new_size;
    line_out[HS*W_DT +: W_TS]    = new_tsp;
    for (int i = 0; i < int'(HS); i++)
      line_out[(HS-1-i)*W_DT +: W_DT] = new_dt[i];
  end
endmodule
