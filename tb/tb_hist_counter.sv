// tb_hist_counter: self-checking test of the histogram elements counter:
// random and extreme keep vectors against a bit count.
module tb_hist_counter;
  logic keep_p;
  logic [15:0] keep;
  logic [4:0] count;
  int checks = 0, failures = 0;

  hist_counter #(.HS(16)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int exp;
      keep_p = (n == 1) ? 1'b1 : 1'($urandom);
      keep = (n == 0) ? 16'h0 : (n == 1) ? 16'hffff : 16'($urandom);
      #1;
      exp = int'(keep_p);
      for (int i = 0; i < 16; i++) exp += int'(keep[i]);
      checks++;
      if (int'(count) != exp) begin failures++; $display("FAIL %b %b -> %0d", keep_p, keep, count); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
