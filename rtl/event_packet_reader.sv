// event_packet_reader: event packet buffer (EP) and event packet counter (CNT).
//
// A packet of AER events is loaded into the buffer through a simple write
// port. After `start`, the counter walks the buffer from address 0 up to
// pkt_len-1, incrementing by one per event, and streams each 64-bit event on a
// valid/ready output that feeds the input FIFO. The buffer has a synchronous
// read port whose output register is also the output holding register, so one
// event per cycle leaves while `out_ready` is high and the counter stops while
// it is low. `done` rises once the last event of the packet has been taken.
// The counter feeding the packet buffer and the 64-bit path into the input
// FIFO come from the source architecture; the load port, the start/length
// control and the 90000-event default depth (the packet size used in the
// source's runtime measurement) are this design's choices.
module event_packet_reader #(
  parameter int unsigned PKT_DEPTH = 90000,
  parameter int unsigned AW        = $clog2(PKT_DEPTH + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // packet load port
  input  logic                          ld_en,
  input  logic [AW-1:0]                 ld_addr,
  input  parahist_pkg::aer_event_t      ld_data,
  // control
  input  logic                          start,
  input  logic [AW-1:0]                 pkt_len,
  output logic                          busy,
  output logic                          done,
  output logic [AW-1:0]                 evt_count,
  // event stream towards the input FIFO
  output logic                          out_valid,
  output parahist_pkg::aer_event_t      out_data,
  input  logic                          out_ready
);
  import parahist_pkg::*;

  aer_event_t    pkt_mem [PKT_DEPTH];
  logic [AW-1:0] cnt, len_q;
  logic          running, rd_en;

  assign rd_en     = running && (cnt != len_q) && (!out_valid || out_ready);
  assign busy      = running;
  assign evt_count = cnt;

  always_ff @(posedge clk) begin
    if (ld_en) pkt_mem[ld_addr] <= ld_data;
    if (rd_en) out_data <= pkt_mem[cnt];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      len_q     <= '0;
      running   <= 1'b0;
      out_valid <= 1'b0;
      done      <= 1'b0;
    end else begin
      if (start && !running) begin
        cnt     <= '0;
        len_q   <= pkt_len;
        running <= 1'b1;
        done    <= 1'b0;
      end else if (running) begin
        if (rd_en) begin
          cnt       <= cnt + 1'b1;
          out_valid <= 1'b1;
        end else if (out_ready) begin
          out_valid <= 1'b0;
        end
        if (cnt == len_q && (!out_valid || out_ready)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end
endmodule
