// tb_nbr_data_mapper: self-checking test of the neighbourhood data mapper.
// Fills the 64 bank outputs with random lines and random valid bits and checks
// that region (dx, dy) receives bank {(y+dy) mod 8, (x+dx) mod 8}, or zero when
// that bank is not valid, for radius 2.
module tb_nbr_data_mapper;
  localparam int R = 2, NR = 25, LW = 72;
  logic [2:0] x_lo, y_lo;
  logic [LW-1:0] bank_data [64];
  logic [63:0] bank_valid;
  logic [LW-1:0] region_line [NR];
  logic [NR-1:0] region_valid;
  int checks = 0, failures = 0;

  nbr_data_mapper #(.R(R), .LINE_W(LW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      x_lo = 3'($urandom); y_lo = 3'($urandom);
      bank_valid = {$urandom, $urandom};
      for (int b = 0; b < 64; b++) bank_data[b] = {8'($urandom), $urandom, $urandom};
      #1;
      for (int dy = -R; dy <= R; dy++)
        for (int dx = -R; dx <= R; dx++) begin
          int k, b;
          k = (dy + R) * 5 + (dx + R);
          b = ((int'(y_lo) + dy + 8) % 8) * 8 + (int'(x_lo) + dx + 8) % 8;
          checks++;
          if (region_valid[k] != bank_valid[b] ||
              region_line[k] != (bank_valid[b] ? bank_data[b] : '0)) begin
            failures++;
            $display("FAIL region %0d", k);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
