// tb_prefix_adder: self-checking test of the radix-4 Sklansky prefix adder.
// Three sizes (16: two full radix-4 levels, 12: an incomplete top block,
// 64: three levels) with random, all-zero and all-maximum inputs, checked
// against a running sum.
module tb_prefix_adder;
  logic [3:0] a16 [16], a12 [12];
  logic [7:0] s16 [16], s12 [12];
  logic [5:0] a64 [64];
  logic [11:0] s64 [64];
  int checks = 0, failures = 0;

  prefix_adder #(.N(16), .IN_W(4), .OUT_W(8))  d16 (.din(a16), .dout(s16));
  prefix_adder #(.N(12), .IN_W(4), .OUT_W(8))  d12 (.din(a12), .dout(s12));
  prefix_adder #(.N(64), .IN_W(6), .OUT_W(12)) d64 (.din(a64), .dout(s64));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int acc;
      for (int i = 0; i < 16; i++) a16[i] = (n == 0) ? 4'd0 : (n == 1) ? 4'hf : 4'($urandom);
      for (int i = 0; i < 12; i++) a12[i] = (n == 1) ? 4'hf : 4'($urandom);
      for (int i = 0; i < 64; i++) a64[i] = (n == 1) ? 6'h3f : 6'($urandom);
      #1;
      acc = 0;
      for (int i = 0; i < 16; i++) begin
        acc += a16[i]; checks++;
        if (int'(s16[i]) != acc) begin failures++; $display("FAIL n16 i=%0d", i); end
      end
      acc = 0;
      for (int i = 0; i < 12; i++) begin
        acc += a12[i]; checks++;
        if (int'(s12[i]) != acc) begin failures++; $display("FAIL n12 i=%0d", i); end
      end
      acc = 0;
      for (int i = 0; i < 64; i++) begin
        acc += a64[i]; checks++;
        if (int'(s64[i]) != acc) begin failures++; $display("FAIL n64 i=%0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
