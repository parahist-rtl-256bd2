// tb_compare_shift: self-checking test of outlier removal and the ring shift.
// First the worked example of the design description (current time 210,
// threshold 50, previous time 200, differences 0..15): the first nine older
// entries survive and the new ring is 10,0,1,...,8 followed by zeros. Then
// random rings against a behavioural model of the same rules.
module tb_compare_shift;
  localparam int HS = 16, WDT = 4, WTS = 16, SW = 5;
  logic line_valid, keep_p;
  logic [31:0] tsc, threshold, age;
  logic [SW-1:0] size, new_size;
  logic signed [33:0] tsp_full, ts [HS];
  logic [WDT-1:0] dt [HS], new_dt [HS];
  logic [HS-1:0] keep;
  logic [WTS-1:0] new_tsp;
  int checks = 0, failures = 0, outliers = 0, saturated = 0;

  compare_shift #(.HS(HS), .W_DT(WDT), .W_TS(WTS), .SIZE_W(SW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply(input int t, input int thr, input int prev, input int sz);
    int acc;
    tsc = t; threshold = thr; size = SW'(sz); tsp_full = prev;
    age = t - prev;
    acc = 0;
    for (int i = 0; i < HS; i++) begin acc += dt[i]; ts[i] = prev - acc; end
    #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_dt [HS] = '{10, 0, 1, 2, 3, 4, 5, 6, 7, 8, 0, 0, 0, 0, 0, 0};
    line_valid = 1;
    for (int i = 0; i < HS; i++) dt[i] = WDT'(i);
    apply(210, 50, 200, 17);
    check(keep_p && keep == 16'h01ff, $sformatf("example keep %b", keep));
    check(new_size == 11 && new_tsp == 210, "example size/tsp");
    for (int i = 0; i < HS; i++) check(new_dt[i] == WDT'(exp_dt[i]), $sformatf("example dt'[%0d]=%0d", i, new_dt[i]));

    for (int n = 0; n < 5000; n++) begin
      int t, thr, prev, sz, lim, nv, kept, cap, m_keep [HS + 1], m_new [HS];
      bit kp;
      line_valid = ($urandom % 10) != 0;
      for (int i = 0; i < HS; i++) dt[i] = WDT'($urandom % ((n % 3 == 0) ? 16 : 4));
      t = 1000 + $urandom % 1000; thr = $urandom % 40; prev = t - $urandom % 20; sz = $urandom % 18;
      apply(t, thr, prev, sz);
      // model
      cap = 17;
      lim = t - thr;
      kp = line_valid && sz != 0 && prev >= lim && (t - prev) <= 15;
      kept = int'(kp);
      for (int i = 0; i < HS; i++) begin
        m_keep[i] = kp && i < sz - 1 && ts[i] >= lim;
        kept += m_keep[i];
      end
      if (kp && kept < sz) outliers++;
      nv = (kept + 1 < cap ? kept + 1 : cap);
      if (kept + 1 > cap) saturated++;
      check(keep_p == kp, "keep_p");
      for (int i = 0; i < HS; i++) check(keep[i] == m_keep[i][0], $sformatf("keep[%0d]", i));
      check(int'(new_size) == nv, "size");
      check(new_tsp == WTS'(t), "tsp");
      m_new[0] = (kp && nv > 1) ? t - prev : 0;
      for (int j = 1; j < HS; j++) m_new[j] = (m_keep[j-1] && j < nv - 1) ? int'(dt[j-1]) : 0;
      for (int j = 0; j < HS; j++) check(int'(new_dt[j]) == m_new[j], $sformatf("dt'[%0d]", j));
    end
    check(outliers > 0, "outliers removed at least once");
    check(saturated > 0, "capacity reached at least once");
    $display("outliers=%0d saturated=%0d", outliers, saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
