// compare_shift: comparison and shift unit (CS).
//
// Outlier removal and ring buffer update for one region. An event stored in
// the region is kept when it is no older than the threshold, i.e. when
// (tsc - threshold) - t <= 0 for its absolute time t; older ones are
// outliers. Because the stored times decrease along the ring, the kept
// entries always form a prefix. The newest stored event (tsp) is kept only if
// its age also fits a W_DT-bit difference field, and entries beyond the
// line's size field are never kept.
//
// The updated line is the ring shifted right by one slot: tsp' = tsc,
// dt'[0] = tsc - tsp (the age of the previous newest event), dt'[i+1] = dt[i]
// for every kept entry, zero for outliers; the entry in the last slot falls
// off. size' = min(kept + 1, CAP), CAP = min(HS + 1, 2^SIZE_W - 1), counts the
// events held including the new one, and entries past it are cleared. The
// update is only written back for the region of the event itself. Purely
// combinational. The comparison against tsc - threshold, the zeroing of
// outliers and the shift by one follow the source; the size field semantics,
// CAP and the W_DT age limit are this design's choices.
module compare_shift #(
  parameter int unsigned HS     = 16,
  parameter int unsigned W_DT   = 4,
  parameter int unsigned W_TS   = 4,
  parameter int unsigned SIZE_W = 4,
  parameter int unsigned TIME_W = 32
) (
  input  logic                      line_valid,
  input  logic [TIME_W-1:0]         tsc,
  input  logic [TIME_W-1:0]         threshold,
  input  logic [SIZE_W-1:0]         size,
  input  logic [TIME_W-1:0]         age,
  input  logic signed [TIME_W+1:0]  tsp_full,
  input  logic signed [TIME_W+1:0]  ts      [HS],
  input  logic [W_DT-1:0]           dt      [HS],
  output logic                      keep_p,
  output logic [HS-1:0]             keep,
  output logic [SIZE_W-1:0]         new_size,
  output logic [W_TS-1:0]           new_tsp,
  output logic [W_DT-1:0]           new_dt  [HS]
);
  localparam int unsigned SIZE_MAX = (1 << SIZE_W) - 1;
  localparam int unsigned CAP      = (HS + 1 < SIZE_MAX) ? HS + 1 : SIZE_MAX;
  localparam int unsigned DT_MAX   = (1 << W_DT) - 1;

  logic signed [TIME_W+1:0] limit;
  int unsigned              n_dt, kept, n_new;

  always_comb begin
    limit  = $signed({2'b00, tsc}) - $signed({2'b00, threshold});
    n_dt   = (size == '0) ? 0 : int'(size) - 1;
    keep_p = line_valid && (size != '0) && (limit - tsp_full <= 0) &&
             (age <= TIME_W'(DT_MAX));
    kept   = int'(keep_p);
    for (int i = 0; i < int'(HS); i++) begin
      keep[i] = keep_p && (i < int'(n_dt)) && (limit - ts[i] <= 0);
      kept    = kept + int'(keep[i]);
    end
    n_new    = (kept + 1 < CAP) ? kept + 1 : CAP;
    new_size = SIZE_W'(n_new);
    new_tsp  = W_TS'(tsc);
    // shift right by one; slot j of the new ring is valid for j < n_new - 1
    new_dt[0] = (keep_p && n_new > 1) ? W_DT'(age) : '0;
    for (int j = 1; j < int'(HS); j++)
      new_dt[j] = (keep[j-1] && j < int'(n_new) - 1) ? dt[j-1] : '0;
  end
endmodule
