// tb_sync_fifo: self-checking test of sync_fifo.
// Random pushes and pops (never pushing when full nor popping when empty)
// against a queue model; checks data order, count, full and empty each cycle.
module tb_sync_fifo;
  localparam int W = 16, D = 5;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int saw_full = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin

    push = 0; pop = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(count == $bits(count)'(model.size()), "count");
      check(full == (model.size() == D), "full");
      check(empty == (model.size() == 0), "empty");
      if (model.size() > 0) check(rd_data == model[0], "data");
      if (full) saw_full++;
      // bias towards filling in the first half, draining in the second
      push = !full && (($urandom % 100) < ((cyc % 400) < 200 ? 70 : 30));
      pop  = !empty && (($urandom % 100) < ((cyc % 400) < 200 ? 30 : 70));
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wr_data);
    end
    check(saw_full > 0, "FIFO reached full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
