// tb_parahist_cfg: parameterised end-to-end check of parahist_top, used by
// tb_parahist_workloads to run the design in the configurations of the
// resource and throughput study (search radius, ring buffer size, line width).
//
// The reference model keeps per pixel the list of event times its ring buffer
// stands for and applies the design's rules: age of the newest stored event
// modulo 2^min(W_TS,32), entries older than tsc - THR dropped, an age above
// 2^W_DT - 1 treated as an outlier, at most CAP = min(HS+1, 2^SIZE_W - 1)
// events per pixel, and a 3x3 background activity filter with threshold DTN.
// It first streams 200 events with the output always drained and checks the
// rate of one event per cycle, then one packet with random output
// back-pressure, and compares every histogram. With TSS > 0 the events carry microsecond timestamps whose
// quantised value (timestamp >> TSS) is what the model works with. `done`
// rises when the run is over; checks and failures are reported to the parent.
module tb_parahist_cfg #(
  parameter int R     = 2,
  parameter int HS    = 12,
  parameter int PN    = 2,
  parameter int W_DT  = 4,
  parameter int THR   = 12,
  parameter int DTN   = 6,
  parameter int NEV   = 3000,
  parameter int TSS   = 0,     // timestamp quantisation shift
  parameter int SEED  = 1
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import parahist_pkg::*;

  localparam int SW = 240, SH = 180, D = 2 * R + 1, NR = D * D;
  localparam int SIZE_W = floor_log2(HS);
  localparam int CAP = (HS + 1 < (1 << SIZE_W) - 1) ? HS + 1 : (1 << SIZE_W) - 1;
  localparam int W_TS = 72 * PN - HS * W_DT - SIZE_W;
  localparam longint AGE_MASK = (W_TS >= 32) ? 64'hffff_ffff : (64'd1 << W_TS) - 1;
  localparam int DT_MAX = (1 << W_DT) - 1;
  localparam int CNT_W = $clog2(HS + 2);
  localparam int PKT = 4096, AW = $clog2(PKT + 1);

  logic clk = 0, rst_n = 0;
  logic ld_en, start, pkt_busy, pkt_done, hist_valid, hist_pop, idle;
  logic [AW-1:0] ld_addr, pkt_len;
  aer_event_t ld_data;
  logic [31:0] cfg_threshold, cfg_dtn;
  logic [CNT_W-1:0] hist_bin [NR];
  logic [31:0] stat_events, stat_noise, stat_offsensor, stat_bypass, stat_stall;

  parahist_top #(.R(R), .HS(HS), .W_DT(W_DT), .PN(PN), .TS_SHIFT(TSS), .PKT_DEPTH(PKT)) dut (.*);

  always #5 clk = ~clk;

  typedef int hist_t [NR];
  int times [SW*SH][$];
  hist_t exp_q [$];
  int m_outlier = 0, m_cap = 0, popped = 0;

  function automatic bit on_sensor(int x, int y);
    return x >= 0 && y >= 0 && x < SW && y < SH;
  endfunction

  function automatic int age_of(int t, int newest);
    return int'(longint'(t - newest) & AGE_MASK);
  endfunction

  task automatic model_event(input int x, input int y, input int t);
    hist_t hb;
    bit pass;
    int c, newest, prev_full, age, kept;
    int keep_list [$];
    if (!on_sensor(x, y)) return;
    pass = 0;
    for (int dy = -R; dy <= R; dy++)
      for (int dx = -R; dx <= R; dx++) begin
        int k, nx, ny;
        k = (dy + R) * D + dx + R;
        nx = x + dx; ny = y + dy;
        hb[k] = 0;
        if (!on_sensor(nx, ny)) continue;
        c = ny * SW + nx;
        if (times[c].size() == 0) continue;
        newest = times[c][0];
        age = age_of(t, newest);
        if (dx >= -1 && dx <= 1 && dy >= -1 && dy <= 1 && age < DTN) pass = 1;
        if (age > THR || age > DT_MAX) continue;
        prev_full = t - age;
        kept = 0;
        keep_list.delete();
        for (int i = 0; i < times[c].size(); i++) begin
          int ti;
          ti = prev_full - (newest - times[c][i]);
          if (ti >= t - THR) begin kept++; keep_list.push_back(ti); end
        end
        hb[k] = kept;
        if (dx == 0 && dy == 0) begin
          if (kept < times[c].size()) m_outlier++;
          times[c] = keep_list;
        end
      end
    c = y * SW + x;
    if (times[c].size() > 0) begin
      age = age_of(t, times[c][0]);
      if (age > THR || age > DT_MAX) begin m_outlier++; times[c].delete(); end
    end
    times[c].push_front(t);
    if (times[c].size() > CAP) begin
      m_cap++;
      while (times[c].size() > CAP) void'(times[c].pop_back());
    end
    if (pass) exp_q.push_back(hb);
  endtask

  always @(posedge clk) begin
    if (rst_n && hist_valid && hist_pop) begin
      popped++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL R=%0d HS=%0d: unexpected histogram", R, HS);
      end else begin
        for (int k = 0; k < NR; k++)
          if (int'(hist_bin[k]) != exp_q[0][k]) begin
            failures++;
            if (failures < 10) $display("FAIL R=%0d HS=%0d hist %0d bin %0d: %0d vs %0d", R, HS, popped, k, hist_bin[k], exp_q[0][k]);
          end
        void'(exp_q.pop_front());
      end
    end
  end

  int pop_pct = 40, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) hist_pop <= ($urandom % 100) < pop_pct;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL R=%0d HS=%0d: %s", R, HS, what); end
  endtask

  initial begin
    int t, n, sel, bx, by, c0;
    aer_event_t e;
    done = 0; checks = 0; failures = 0;
    ld_en = 0; start = 0; ld_addr = 0; pkt_len = 0; ld_data = '0;
    cfg_threshold = THR; cfg_dtn = DTN;
    void'($urandom(SEED));
    repeat (5) @(posedge clk);
    rst_n = 1;
    // rate phase: 200 events with the output always drained must take one
    // cycle each, whatever the radius
    pop_pct = 100;
    t = 100;
    for (int i = 0; i < 200; i++) begin
      e = '0;
      bx = 30 + $urandom % 5; by = 30 + $urandom % 5;
      e.x_addr = 10'(bx); e.y_addr = 9'(by);
      e.timestamp = (32'(t) << TSS) | (32'($urandom) & ((32'd1 << TSS) - 1));
      @(negedge clk);
      ld_en = 1; ld_addr = AW'(i); ld_data = e;
      model_event(bx, by, t);
      t += $urandom % 2;
    end
    @(negedge clk);
    ld_en = 0; pkt_len = AW'(200); start = 1;
    c0 = cyc;
    @(negedge clk);
    start = 0;
    @(posedge clk);
    while (!(pkt_done && idle)) @(posedge clk);
    check(cyc - c0 <= 200 + 8, $sformatf("one event per cycle: 200 events took %0d cycles", cyc - c0));
    while (exp_q.size() != 0) @(posedge clk);
    pop_pct = 40;
    t += 100;
    n = 0;
    while (n < NEV) begin
      sel = $urandom % 100;
      if (sel < 10) begin bx = $urandom % 4; by = SH - 1 - $urandom % 4; end
      else if (sel < 15) begin bx = SW + $urandom % 8; by = $urandom % SH; end
      else begin bx = 80 + $urandom % 8; by = 40 + $urandom % 8; end
      for (int j = 0; j < ((sel % 7 == 0) ? 20 : 1) && n < NEV; j++) begin
        e = '0;
        e.x_addr = 10'(bx); e.y_addr = 9'(by);
        // microsecond timestamp whose quantised value is t
        e.timestamp = (32'(t) << TSS) | (32'($urandom) & ((32'd1 << TSS) - 1));
        @(negedge clk);
        ld_en = 1; ld_addr = AW'(n); ld_data = e;
        model_event(bx, by, t);
        n++;
        t += ($urandom % 60 == 0) ? 20 + $urandom % 30 : $urandom % 3;
      end
    end
    @(negedge clk);
    ld_en = 0; pkt_len = AW'(NEV); start = 1;
    @(negedge clk);
    start = 0;
    @(posedge clk);
    while (!(pkt_done && idle)) @(posedge clk);
    while (exp_q.size() != 0) @(posedge clk);
    repeat (4) @(posedge clk);
    $display("config R=%0d HS=%0d TS_SHIFT=%0d line=%0d bits (W_TS=%0d, CAP=%0d): histograms=%0d stall=%0d bypass=%0d noise=%0d outlier=%0d capacity=%0d offsensor=%0d",
             R, HS, TSS, 72 * PN, W_TS, CAP, popped, stat_stall, stat_bypass, stat_noise, m_outlier, m_cap, stat_offsensor);
    check(popped > 0 && stat_stall > 0 && stat_bypass > 0 && stat_noise > 0 && m_outlier > 0 && m_cap > 0 && stat_offsensor > 0,
          "every mechanism happened");
    done = 1;
  end
endmodule
