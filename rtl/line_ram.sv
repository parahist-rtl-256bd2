// line_ram: one RAM bank of the event memory.
//
// A simple dual-port memory with one synchronous read port and one write
// port, the shape of an FPGA block RAM or UltraRAM. A read returns the line
// that was stored before the clock edge (read-first), so a read and a write of
// the same line in one cycle return the old contents; the event memory
// forwards the new contents around this. All lines start at zero, which the
// pipeline reads as "no event stored for this pixel yet". The latency of one
// cycle is this design's choice.
module line_ram #(
  parameter int unsigned WIDTH = 72,
  parameter int unsigned DEPTH = 690,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end
endmodule
