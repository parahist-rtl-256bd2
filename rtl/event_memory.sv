// event_memory: the 8x8 array of RAM banks that stores the compressed
// per-pixel ring buffers (Fig. 1 "RAM (0)" .. "RAM (63)").
//
// Bank b = {y[2:0], x[2:0]} holds the pixels whose low coordinate bits select
// it, one memory line per pixel, so the whole neighbourhood of an event is
// read in a single cycle with one read per bank. Reads are registered: the
// lines requested in cycle t appear in cycle t+1 together with a per-bank
// valid bit. The single write port (stage 5, write back) updates one line per
// cycle through per-bank write enables from the data demapper.
//
// Read-after-write bypass: a line written at the end of cycle t may have been
// read, old, by the next event at that same edge. The most recent write
// (bank, address, data) is therefore kept in a register, and a bank whose
// registered read address matches it returns the registered data instead of
// the RAM output. This covers a write at the same edge as the read; a write
// one cycle after the read is forwarded by the pipeline around this block.
// `fwd_hit` pulses when the bypass is used.
// The bypass is this design's; the source does not say how the pipeline
// avoids reading stale lines.
module event_memory #(
  parameter int unsigned LINE_W  = 72,
  parameter int unsigned DEPTH   = 690,
  parameter int unsigned LINE_AW = $clog2(DEPTH)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // read side, from the neighbourhood address mapper
  input  logic [parahist_pkg::N_BANKS-1:0] rd_en,
  input  logic [LINE_AW-1:0]               rd_addr  [parahist_pkg::N_BANKS],
  output logic [LINE_W-1:0]                rd_data  [parahist_pkg::N_BANKS],
  output logic [parahist_pkg::N_BANKS-1:0] rd_valid,
  // write side, from the data demapper
  input  logic [parahist_pkg::N_BANKS-1:0] wr_en,
  input  logic [LINE_AW-1:0]               wr_addr,
  input  logic [LINE_W-1:0]                wr_data,
  output logic                             fwd_hit
);
  import parahist_pkg::*;

  logic [LINE_W-1:0]  ram_q   [N_BANKS];
  logic [LINE_AW-1:0] raddr_q [N_BANKS];
  logic [N_BANKS-1:0] fwd_sel;

  // last write, for the bypass
  logic               lw_valid;
  logic [5:0]         lw_bank;
  logic [LINE_AW-1:0] lw_addr;
  logic [LINE_W-1:0]  lw_data;

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    line_ram #(.WIDTH(LINE_W), .DEPTH(DEPTH), .AW(LINE_AW)) u_ram (
      .clk     (clk),
      .rd_en   (rd_en[b]),
      .rd_addr (rd_addr[b]),
      .rd_data (ram_q[b]),
      .wr_en   (wr_en[b]),
      .wr_addr (wr_addr),
      .wr_data (wr_data)
    );

    always_ff @(posedge clk) begin
      if (rd_en[b]) raddr_q[b] <= rd_addr[b];
    end

    assign fwd_sel[b] = lw_valid && (lw_bank == 6'(b)) && (lw_addr == raddr_q[b]);
    assign rd_data[b] = fwd_sel[b] ? lw_data : ram_q[b];
  end

  assign fwd_hit = |(fwd_sel & rd_valid);

  // index of the (one-hot) written bank
  logic [5:0] wr_bank;
  always_comb begin
    wr_bank = '0;
    for (int b = 0; b < int'(N_BANKS); b++)
      if (wr_en[b]) wr_bank = 6'(b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= '0;
      lw_valid <= 1'b0;
      lw_bank  <= '0;
      lw_addr  <= '0;
      lw_data  <= '0;
    end else begin
      rd_valid <= rd_en;
      if (|wr_en) begin
        lw_valid <= 1'b1;
        lw_bank  <= wr_bank;
        lw_addr  <= wr_addr;
        lw_data  <= wr_data;
      end
    end
  end

  a_one_write: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wr_en));
endmodule
