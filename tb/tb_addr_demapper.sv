// tb_addr_demapper: self-checking test of the coordinate to bank/line mapping.
// Sweeps every coordinate of a small sensor and random ones of the default
// sensor, checking bank = {y mod 8, x mod 8}, line = (y/8)*ceil(W/8) + x/8 and
// the on-sensor flag.
module tb_addr_demapper;
  localparam int W1 = 240, H1 = 180, W2 = 20, H2 = 13;
  logic [9:0] x;
  logic [8:0] y;
  logic [5:0] bank1, bank2;
  logic [9:0] line1;
  logic [4:0] line2;
  logic in1, in2;
  int checks = 0, failures = 0;

  addr_demapper #(.SENSOR_W(W1), .SENSOR_H(H1)) dut1 (.x, .y, .bank(bank1), .line_addr(line1), .in_range(in1));
  addr_demapper #(.SENSOR_W(W2), .SENSOR_H(H2)) dut2 (.x, .y, .bank(bank2), .line_addr(line2), .in_range(in2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s x=%0d y=%0d", what, x, y); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int yy = 0; yy < 20; yy++)
      for (int xx = 0; xx < 30; xx++) begin
        x = 10'(xx); y = 9'(yy); #1;
        check(bank2 == 6'((yy % 8) * 8 + (xx % 8)), "bank");
        check(in2 == (xx < W2 && yy < H2), "in_range");
        if (xx < W2 && yy < H2) check(int'(line2) == (yy / 8) * 3 + xx / 8, "line");
      end
    for (int n = 0; n < 2000; n++) begin
      x = 10'($urandom); y = 9'($urandom); #1;
      check(bank1 == {y[2:0], x[2:0]}, "bank");
      check(in1 == (x < W1 && y < H1), "in_range");
      if (in1) check(int'(line1) == int'(y / 8) * 30 + int'(x / 8), "line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
