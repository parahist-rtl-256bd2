// tb_region_unit: directed test of one processing lane (prefix adder,
// decompression, compare/shift, counter) on packed memory lines.
// Case 1 is the worked example of the design description in a 144-bit line
// with a 5-bit size field: newest time 200, differences 0..15, all 17 events
// stored, current time 210, threshold 50. Case 2 is an empty pixel, case 3 a
// neighbour off the sensor, case 4 a 72-bit default line whose stored time
// wraps modulo 16.
module tb_region_unit;
  localparam int HS = 16, WDT = 4;
  logic [143:0] line_w, out_w;
  logic [71:0]  line_n, out_n;
  logic valid_w, valid_n;
  logic [31:0] tsc, thr;
  logic [4:0] cnt_w, cnt_n;
  int checks = 0, failures = 0;

  region_unit #(.LINE_W(144), .HS(HS), .W_DT(WDT), .SIZE_W(5)) uw (
    .line_valid(valid_w), .line_in(line_w), .tsc, .threshold(thr), .count(cnt_w), .line_out(out_w));
  region_unit #(.LINE_W(72), .HS(HS), .W_DT(WDT), .SIZE_W(4)) un (
    .line_valid(valid_n), .line_in(line_n), .tsc, .threshold(thr), .count(cnt_n), .line_out(out_n));

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
    logic [63:0] dts, exp_dts;
    // case 1
    for (int i = 0; i < HS; i++) dts[(HS-1-i)*WDT +: WDT] = WDT'(i);
    exp_dts = '0;
    exp_dts[60 +: 4] = 4'd10;
    for (int j = 1; j <= 9; j++) exp_dts[(HS-1-j)*WDT +: WDT] = WDT'(j - 1);
    line_w = {5'd17, 75'd200, dts};
    valid_w = 1; tsc = 210; thr = 50;
    valid_n = 0; line_n = '0;
    #1;
    check(cnt_w == 10, $sformatf("example count %0d", cnt_w));
    check(out_w[143:139] == 5'd11, "example new size");
    check(out_w[138:64] == 75'd210, "example new tsp");
    check(out_w[63:0] == exp_dts, $sformatf("example new ring %h", out_w[63:0]));
    // case 2: empty pixel
    line_w = '0; tsc = 77; #1;
    check(cnt_w == 0, "empty count");
    check(out_w == {5'd1, 75'd77, 64'd0}, "empty pixel gets its first event");
    // case 3: neighbour off the sensor
    valid_w = 0; line_w = {5'd17, 75'd70, dts}; #1;
    check(cnt_w == 0, "invalid line counts nothing");
    // case 4: 72-bit line, stored time 4 bits. Newest event at 1021 (stored
    // 1021 mod 16 = 13), gaps 1, 2, 3; now 1030 (age 9), threshold 12:
    // 1021 and 1020 are kept (ages 9, 10), 1018 (age 12) kept, 1015 dropped.
    valid_n = 1;
    line_n = {4'd4, 4'd13, 4'd1, 4'd2, 4'd3, 52'd0};
    tsc = 1030; thr = 12; #1;
    check(cnt_n == 3, $sformatf("wrapped count %0d", cnt_n));
    check(out_n == {4'd4, 4'(1030), 4'd9, 4'd1, 4'd2, 4'd0, 48'd0}, $sformatf("wrapped new line %h", out_n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
