// tb_data_demapper: self-checking test of the write-back demapper: the
// write enable must be one-hot on the requested bank (none when idle) and the
// address and line must pass to all banks.
module tb_data_demapper;
  logic wb_valid;
  logic [5:0] wb_bank;
  logic [9:0] wb_addr, wr_addr;
  logic [71:0] wb_line, wr_data;
  logic [63:0] wr_en;
  int checks = 0, failures = 0;

  data_demapper #(.LINE_W(72), .LINE_AW(10)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      wb_valid = ($urandom % 4) != 0;
      wb_bank = 6'($urandom);
      wb_addr = 10'($urandom);
      wb_line = {8'($urandom), $urandom, $urandom};
      #1;
      checks += 3;
      if (wr_en != (wb_valid ? (64'd1 << wb_bank) : 64'd0)) begin failures++; $display("FAIL enable"); end
      if (wr_addr != wb_addr) begin failures++; $display("FAIL addr"); end
      if (wr_data != wb_line) begin failures++; $display("FAIL data"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
