// data_demapper: write-back data demapper (DDM) of stage 5.
//
// Routes the updated ring buffer of the event's own pixel back to the RAM
// bank it came from: the bank index {y[2:0], x[2:0]} is decoded into a one-hot
// write enable, and the line address and data are shared by all banks.
// Only the event's own region is written; its neighbours are read but not
// modified. Purely combinational. The block is named in the source
// architecture; the decoder is this design's.
module data_demapper #(
  parameter int unsigned LINE_W  = 72,
  parameter int unsigned LINE_AW = 10
) (
  input  logic                             wb_valid,
  input  logic [5:0]                       wb_bank,
  input  logic [LINE_AW-1:0]               wb_addr,
  input  logic [LINE_W-1:0]                wb_line,
  output logic [parahist_pkg::N_BANKS-1:0] wr_en,
  output logic [LINE_AW-1:0]               wr_addr,
  output logic [LINE_W-1:0]                wr_data
);
  always_comb begin
    wr_en = '0;
    if (wb_valid) wr_en[wb_bank] = 1'b1;
    wr_addr = wb_addr;
    wr_data = wb_line;
  end
endmodule
