// tb_parahist_workloads: runs the histogram pipeline in the configurations
// of the resource and throughput study, side by side: search radius 1, 2 and
// 3 (3x3, 5x5, 7x7 neighbourhoods), ring buffers of 8, 12 and 16 entries, and
// memory lines of 72, 144, 216 and 288 bits, and one configuration with
// timestamps quantised to 8 us. Each configuration is checked
// end to end against its own reference model (tb_parahist_cfg).
module tb_parahist_workloads;
  logic d [6];
  int c [6], f [6];
  int checks, failures;

  tb_parahist_cfg #(.R(1), .HS(8),  .PN(1), .SEED(11))            u0 (.done(d[0]), .checks(c[0]), .failures(f[0]));
  tb_parahist_cfg #(.R(2), .HS(12), .PN(2), .SEED(12))            u1 (.done(d[1]), .checks(c[1]), .failures(f[1]));
  tb_parahist_cfg #(.R(3), .HS(16), .PN(4), .THR(20), .SEED(13))  u2 (.done(d[2]), .checks(c[2]), .failures(f[2]));
  tb_parahist_cfg #(.R(3), .HS(8),  .PN(1), .SEED(14))            u3 (.done(d[3]), .checks(c[3]), .failures(f[3]));
  tb_parahist_cfg #(.R(2), .HS(16), .PN(3), .SEED(15))            u4 (.done(d[4]), .checks(c[4]), .failures(f[4]));
  tb_parahist_cfg #(.R(1), .HS(12), .PN(1), .TSS(3), .SEED(16))    u5 (.done(d[5]), .checks(c[5]), .failures(f[5]));

  initial begin
    #5000000;
    checks = 0; failures = 1;
    for (int i = 0; i < 6; i++) begin checks += c[i]; failures += f[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    checks = 0; failures = 0;
    for (int i = 0; i < 6; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
