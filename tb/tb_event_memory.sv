// tb_event_memory: self-checking test of the banked event memory.
// Random reads and one-hot writes against an array model, including reads of
// a line in the same cycle it is written: the next cycle must return the new
// contents through the bypass, and fwd_hit must report it.
module tb_event_memory;
  localparam int LW = 72, DEPTH = 12, AW = 4;
  logic clk = 0, rst_n = 0;
  logic [63:0] rd_en, rd_valid, wr_en;
  logic [AW-1:0] rd_addr [64];
  logic [LW-1:0] rd_data [64];
  logic [AW-1:0] wr_addr;
  logic [LW-1:0] wr_data;
  logic fwd_hit;
  logic [LW-1:0] model [64][DEPTH];
  logic [LW-1:0] exp_q [64];
  logic [63:0] exp_v;
  int checks = 0, failures = 0, bypasses = 0;

  event_memory #(.LINE_W(LW), .DEPTH(DEPTH), .LINE_AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 64; b++) for (int a = 0; a < DEPTH; a++) model[b][a] = '0;
    rd_en = '0; wr_en = '0; wr_addr = '0; wr_data = '0; exp_v = '0;
    for (int b = 0; b < 64; b++) rd_addr[b] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // check what was read in the previous cycle
      for (int b = 0; b < 64; b++) if (exp_v[b]) begin
        checks++;
        if (rd_data[b] != exp_q[b]) begin failures++; $display("FAIL bank %0d cyc %0d", b, cyc); end
      end
      checks++;
      if (rd_valid != exp_v) begin failures++; $display("FAIL rd_valid"); end
      if (fwd_hit) bypasses++;
      // new stimulus
      rd_en = {$urandom, $urandom};
      for (int b = 0; b < 64; b++) rd_addr[b] = AW'($urandom % DEPTH);
      wr_en = '0;
      if ($urandom % 4 != 0) begin
        int wb;
        wb = $urandom % 64;
        wr_en[wb] = 1'b1;
        // often write the very line being read
        wr_addr = ($urandom % 2 == 0) ? rd_addr[wb] : AW'($urandom % DEPTH);
        if ($urandom % 2 == 0) rd_en[wb] = 1'b1;
        wr_data = {8'($urandom), $urandom, $urandom};
      end
      // expected read results: the contents after this cycle's write
      @(posedge clk);
      for (int b = 0; b < 64; b++) if (wr_en[b]) model[b][wr_addr] = wr_data;
      exp_v = rd_en;
      for (int b = 0; b < 64; b++) exp_q[b] = model[b][rd_addr[b]];
    end
    checks++;
    if (bypasses == 0) begin failures++; $display("FAIL bypass never used"); end
    $display("bypasses=%0d", bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
