// tb_parahist_top: end-to-end test of the histogram pipeline at its default
// size (radius 1, 16-slot ring buffers in 72-bit lines, 240x180 sensor,
// 90000-event packet buffer).
//
// A behavioural model keeps, per pixel, the list of event times the ring
// buffer represents (newest first) and applies the rules of the design:
// ages of the newest stored event taken modulo 2^4, outliers older than the
// threshold dropped, at most 15 events per pixel, a background activity
// filter over the 3x3 neighbourhood. Every histogram popped from the output
// FIFOs is compared with the model, bin by bin.
//
// Two packets are run. The first streams 300 events with the output always
// drained and checks the rate of one event per clock. The second streams 4000
// events with random output back-pressure and a mix that makes every
// mechanism happen: the input stall, the read/write bypass, noise removal,
// outlier removal, ring buffer capacity, off-sensor events and events at the
// sensor border. Each mechanism's count is printed and must be non-zero.
module tb_parahist_top;
  import parahist_pkg::*;

  localparam int SW = 240, SH = 180, NR = 9, CAP = 15, THR = 12, DTN = 6;
  localparam int AW = $clog2(90000 + 1);

  logic clk = 0, rst_n = 0;
  logic ld_en, start, pkt_busy, pkt_done, hist_valid, hist_pop, idle;
  logic [AW-1:0] ld_addr, pkt_len;
  aer_event_t ld_data;
  logic [31:0] cfg_threshold, cfg_dtn;
  logic [4:0] hist_bin [NR];
  logic [31:0] stat_events, stat_noise, stat_offsensor, stat_bypass, stat_stall;

  parahist_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference model ----------------
  int times [SW*SH][$];        // per pixel, newest first
  typedef int hist_t [NR];
  hist_t exp_q [$];
  int m_events = 0, m_noise = 0, m_offsensor = 0, m_outlier = 0, m_cap = 0, m_border = 0;
  int pop_pct = 100;
  int popped = 0;

  function automatic bit on_sensor(int x, int y);
    return x >= 0 && y >= 0 && x < SW && y < SH;
  endfunction

  task automatic model_event(input int x, input int y, input int t);
    hist_t hb;
    bit pass;
    int c, newest, prev_full, age, kept;
    int keep_list [$];
    if (!on_sensor(x, y)) begin
      m_offsensor++;
      return;
    end
    m_events++;
    if (x == 0 || y == 0 || x == SW - 1 || y == SH - 1) m_border++;
    pass = 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++) begin
        int k, nx, ny;
        k = (dy + 1) * 3 + dx + 1;
        nx = x + dx; ny = y + dy;
        hb[k] = 0;
        if (!on_sensor(nx, ny)) continue;
        c = ny * SW + nx;
        if (times[c].size() == 0) continue;
        newest = times[c][0];
        age = (t - newest) & 15;
        if (age < DTN) pass = 1;
        if (age > THR) continue;
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
          // the update of the event's own pixel
          times[c] = keep_list;
        end
      end
    c = y * SW + x;
    // an outlier newest event means all history is dropped
    if (times[c].size() > 0 && ((t - times[c][0]) & 15) > THR) begin
      m_outlier++;
      times[c].delete();
    end
    times[c].push_front(t);
    if (times[c].size() > CAP) begin
      m_cap++;
      while (times[c].size() > CAP) void'(times[c].pop_back());
    end
    if (pass) exp_q.push_back(hb); else m_noise++;
  endtask

  // ---------------- output checker ----------------
  always @(posedge clk) begin
    if (rst_n && hist_valid && hist_pop) begin
      popped++;
      if (exp_q.size() == 0) begin
        failures++; checks++;
        $display("FAIL unexpected histogram");
      end else begin
        for (int k = 0; k < NR; k++) begin
          checks++;
          if (int'(hist_bin[k]) != exp_q[0][k]) begin
            failures++;
            if (failures < 20) $display("FAIL histogram %0d bin %0d: got %0d expected %0d", popped, k, hist_bin[k], exp_q[0][k]);
          end
        end
        void'(exp_q.pop_front());
      end
    end
  end

  always @(negedge clk) hist_pop <= ($urandom % 100) < pop_pct;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // load a packet, model it, run it and wait until the outputs drain
  int ex [$], ey [$], et [$];
  task automatic run_packet(output int cycles);
    int c0;
    for (int i = 0; i < ex.size(); i++) begin
      aer_event_t e;
      e = '0;
      e.x_addr = 10'(ex[i]); e.y_addr = 9'(ey[i]); e.timestamp = et[i];
      e.polarity = 1'($urandom); e.adc = 10'($urandom);
      @(negedge clk);
      ld_en = 1; ld_addr = AW'(i); ld_data = e;
      model_event(ex[i], ey[i], et[i]);
    end
    @(negedge clk);
    ld_en = 0;
    pkt_len = AW'(ex.size());
    start = 1;
    c0 = cyc;
    @(negedge clk);
    start = 0;
    @(posedge clk);
    while (!(pkt_done && idle)) @(posedge clk);
    cycles = cyc - c0;
    while (exp_q.size() != 0 && cyc - c0 < 100000) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    int t, cycles, s_events, s_noise;
    ld_en = 0; start = 0; ld_addr = 0; pkt_len = 0; ld_data = '0;
    cfg_threshold = THR; cfg_dtn = DTN;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // packet 1: dense activity in a 6x6 window, output always drained
    pop_pct = 100;
    t = 100;
    for (int i = 0; i < 300; i++) begin
      ex.push_back(100 + $urandom % 6); ey.push_back(50 + $urandom % 6);
      t += $urandom % 2; et.push_back(t);
    end
    run_packet(cycles);
    $display("packet 1: %0d events in %0d cycles", ex.size(), cycles);
    check(cycles <= ex.size() + 8, $sformatf("one event per cycle: %0d events took %0d cycles", ex.size(), cycles));

    // packet 2: mixed traffic with back-pressure
    ex.delete(); ey.delete(); et.delete();
    pop_pct = 35;
    while (ex.size() < 4000) begin
      int sel;
      sel = $urandom % 100;
      if (sel < 4) begin                         // off the sensor
        ex.push_back(SW + $urandom % 20); ey.push_back($urandom % SH);
      end else if (sel < 20) begin               // at the origin corner
        ex.push_back($urandom % 3); ey.push_back($urandom % 3);
      end else if (sel < 30) begin               // at the far corner
        ex.push_back(SW - 1 - $urandom % 3); ey.push_back(SH - 1 - $urandom % 3);
      end else if (sel < 32) begin               // a burst at one pixel
        int bx, by;
        bx = 150 + $urandom % 4; by = 100 + $urandom % 4;
        for (int j = 0; j < 17; j++) begin
          ex.push_back(bx); ey.push_back(by); t += $urandom % 2; et.push_back(t);
        end
        ex.push_back(bx); ey.push_back(by);
      end else if (sel < 45 && ex.size() > 0) begin  // same pixel again
        ex.push_back(ex[$]); ey.push_back(ey[$]);
      end else begin                             // a small busy patch
        ex.push_back(60 + $urandom % 5); ey.push_back(70 + $urandom % 5);
      end
      t += ($urandom % 50 == 0) ? 30 + $urandom % 40 : $urandom % 3;
      et.push_back(t);
    end
    run_packet(cycles);
    $display("packet 2: %0d events in %0d cycles", ex.size(), cycles);

    check(exp_q.size() == 0, "all expected histograms came out");
    check(stat_events == m_events, $sformatf("events %0d vs %0d", stat_events, m_events));
    check(stat_noise == m_noise, $sformatf("noise %0d vs %0d", stat_noise, m_noise));
    check(stat_offsensor == m_offsensor, $sformatf("off-sensor %0d vs %0d", stat_offsensor, m_offsensor));
    $display("mechanisms: stall=%0d bypass=%0d noise=%0d outlier=%0d capacity=%0d offsensor=%0d border=%0d histograms=%0d",
             stat_stall, stat_bypass, stat_noise, m_outlier, m_cap, stat_offsensor, m_border, popped);
    check(stat_stall > 0, "input stall happened");
    check(stat_bypass > 0, "read/write bypass happened");
    check(stat_noise > 0, "noise removal happened");
    check(m_outlier > 0, "outlier removal happened");
    check(m_cap > 0, "ring buffer capacity reached");
    check(stat_offsensor > 0, "off-sensor event dropped");
    check(m_border > 0, "border event processed");
    check(popped > 0, "histograms produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
