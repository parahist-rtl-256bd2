// tb_event_packet_reader: self-checking test of the event packet buffer and
// counter. Loads a packet of random events, streams it out twice: once with
// the consumer always ready (checks one event per cycle) and once with random
// back-pressure (checks order, count and the done flag).
module tb_event_packet_reader;
  import parahist_pkg::*;
  localparam int DEPTH = 64, AW = $clog2(DEPTH + 1);
  logic clk = 0, rst_n = 0;
  logic ld_en, start, busy, done, out_valid, out_ready;
  logic [AW-1:0] ld_addr, pkt_len, evt_count;
  aer_event_t ld_data, out_data;
  aer_event_t pkt [DEPTH];
  int checks = 0, failures = 0;
  int got, first_cyc, last_cyc, cyc;

  event_packet_reader #(.PKT_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input int len, input int ready_pct);
    got = 0;
    @(negedge clk);
    pkt_len = AW'(len);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      out_ready = ($urandom % 100) < ready_pct;
      @(posedge clk);
      if (out_valid && out_ready) begin
        if (got == 0) first_cyc = cyc;
        last_cyc = cyc;
        check(out_data == pkt[got], $sformatf("event %0d", got));
        got++;
      end
      @(negedge clk);
    end
    check(got == len, $sformatf("count %0d of %0d", got, len));
    check(!busy, "idle after done");
  endtask

  initial begin
    cyc = 0;
    ld_en = 0; start = 0; out_ready = 0; ld_addr = 0; pkt_len = 0; ld_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      pkt[i] = aer_event_t'({$urandom, $urandom});
      @(negedge clk);
      ld_en = 1; ld_addr = AW'(i); ld_data = pkt[i];
    end
    @(negedge clk);
    ld_en = 0;
    run(40, 100);
    check(last_cyc - first_cyc == 39, $sformatf("one event per cycle (%0d cycles for 40)", last_cyc - first_cyc + 1));
    run(DEPTH, 40);
    run(1, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
