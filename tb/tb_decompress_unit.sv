// tb_decompress_unit: self-checking test of timestamp decompression.
// First the worked example of the design description (previous time 200,
// differences 0..15, current time 210) with a wide stored field, then random
// cases with a 4-bit stored field, where the previous time must be recovered
// from its low bits as the most recent time <= tsc with those bits.
module tb_decompress_unit;
  localparam int HS = 16, SUM_W = 9;
  logic [31:0] tsc, age_w, age_n;
  logic [15:0] tsp_w;
  logic [3:0] tsp_n;
  logic [SUM_W-1:0] sums [HS];
  logic signed [33:0] full_w, full_n, ts_w [HS], ts_n [HS];
  int checks = 0, failures = 0;
  int expect_fig [HS] = '{200, 199, 197, 194, 190, 185, 179, 172, 164, 155, 145, 134, 122, 109, 95, 80};

  decompress_unit #(.HS(HS), .W_TS(16), .SUM_W(SUM_W)) dw (.tsc, .tsp(tsp_w), .sums, .age(age_w), .tsp_full(full_w), .ts(ts_w));
  decompress_unit #(.HS(HS), .W_TS(4),  .SUM_W(SUM_W)) dn (.tsc, .tsp(tsp_n), .sums, .age(age_n), .tsp_full(full_n), .ts(ts_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc;
    // worked example
    tsc = 210; tsp_w = 200; tsp_n = 4'(200);
    acc = 0;
    for (int i = 0; i < HS; i++) begin acc += i; sums[i] = SUM_W'(acc); end
    #1;
    check(full_w == 200 && age_w == 10, "example previous time");
    for (int i = 0; i < HS; i++) check(ts_w[i] == expect_fig[i], $sformatf("example ts[%0d]=%0d", i, ts_w[i]));
    check(full_n == 200 && ts_n[15] == 80, "example with 4-bit field");
    // random
    for (int n = 0; n < 3000; n++) begin
      int unsigned a, t, p;
      t = (n % 10 == 0) ? $urandom % 20 : $urandom;
      a = $urandom % 16;
      p = t - a;
      tsc = t; tsp_n = 4'(p); tsp_w = 16'(p);
      acc = 0;
      for (int i = 0; i < HS; i++) begin acc += $urandom % 16; sums[i] = SUM_W'(acc); end
      #1;
      check(age_n == a, "age");
      check(full_n == 34'(signed'({2'b00, t})) - a, "previous time");
      for (int i = 0; i < HS; i++)
        check(ts_n[i] == full_n - int'(sums[i]), "ts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
