// tb_noise_filter: self-checking test of the background activity filter.
// Random 3x3 neighbourhoods of lines (4-bit stored time, so ages wrap modulo
// 16) against a model of "pass when some valid, non-empty neighbour has
// (tsc - tsp) mod 16 < dtn".
module tb_noise_filter;
  localparam int LW = 72, HS = 16, WDT = 4, SW = 4;
  logic [LW-1:0] line_in [9];
  logic [8:0] line_valid, recent;
  logic [31:0] tsc, dtn;
  logic pass;
  int checks = 0, failures = 0, passed = 0, blocked = 0;

  noise_filter #(.LINE_W(LW), .HS(HS), .W_DT(WDT), .SIZE_W(SW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      bit exp_pass;
      tsc = $urandom; dtn = $urandom % 18;
      line_valid = 9'($urandom);
      for (int k = 0; k < 9; k++) begin
        line_in[k] = {8'($urandom), $urandom, $urandom};
        if ($urandom % 3 == 0) line_in[k][71:68] = 4'd0;   // empty pixel
      end
      #1;
      exp_pass = 0;
      for (int k = 0; k < 9; k++) begin
        bit r;
        r = line_valid[k] && line_in[k][71:68] != 0 && int'(4'(tsc[3:0] - line_in[k][67:64])) < int'(dtn);
        checks++;
        if (recent[k] != r) begin failures++; $display("FAIL recent[%0d]", k); end
        exp_pass |= r;
      end
      checks++;
      if (pass != exp_pass) begin failures++; $display("FAIL pass"); end
      if (pass) passed++; else blocked++;
    end
    checks++;
    if (passed == 0 || blocked == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
