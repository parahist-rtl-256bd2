// tb_nbr_addr_mapper: self-checking test of the neighbourhood address mapper.
// For random events (including ones at the sensor edges) and radii 1 and 3,
// builds the expected set of (bank, line) pairs from the neighbour offsets and
// checks that exactly those banks are enabled with those line addresses.
module tb_nbr_addr_mapper;
  import parahist_pkg::*;
  localparam int SW = 240, SH = 180;
  logic ev_valid;
  logic [9:0] x;
  logic [8:0] y;
  logic [63:0] en1, en3;
  logic [9:0] addr1 [64], addr3 [64];
  int checks = 0, failures = 0;

  nbr_addr_mapper #(.R(1)) dut1 (.ev_valid, .x, .y, .rd_en(en1), .rd_addr(addr1));
  nbr_addr_mapper #(.R(3)) dut3 (.ev_valid, .x, .y, .rd_en(en3), .rd_addr(addr3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s x=%0d y=%0d", what, x, y); end
  endtask

  task automatic expect_r(input int r, input logic [63:0] en, input logic [9:0] addr [64]);
    logic [63:0] exp_en;
    int exp_addr [64];
    exp_en = '0;
    for (int dy = -r; dy <= r; dy++)
      for (int dx = -r; dx <= r; dx++) begin
        int nx, ny, b;
        nx = int'(x) + dx; ny = int'(y) + dy;
        if (ev_valid && nx >= 0 && ny >= 0 && nx < SW && ny < SH) begin
          b = (ny % 8) * 8 + (nx % 8);
          exp_en[b] = 1'b1;
          exp_addr[b] = (ny / 8) * 30 + nx / 8;
        end
      end
    check(en == exp_en, $sformatf("enables r=%0d", r));
    for (int b = 0; b < 64; b++)
      if (exp_en[b]) check(int'(addr[b]) == exp_addr[b], $sformatf("addr r=%0d bank %0d", r, b));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      ev_valid = (n % 17) != 0;
      case (n % 5)
        0: begin x = 10'($urandom % 4); y = 9'($urandom % SH); end
        1: begin x = 10'(SW - 1 - $urandom % 4); y = 9'(SH - 1 - $urandom % 4); end
        default: begin x = 10'($urandom % SW); y = 9'($urandom % SH); end
      endcase
      #1;
      expect_r(1, en1, addr1);
      expect_r(3, en3, addr3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
