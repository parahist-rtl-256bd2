// parahist_top: parallel event-based histogram generator.
//
// Each event from a DVS camera (an AEDAT 2.0 word: pixel x/y, timestamp)
// updates a per-pixel ring buffer of recent event times and yields, for every
// pixel in the (2R+1)x(2R+1) neighbourhood, the number of its events that lie
// within a time threshold of the new one. Those (2R+1)^2 counts form the
// event's histogram, consumed by an optical flow (gradient) stage outside this
// design.
//
// Stages, as in the source architecture:
//   1 event mapping   event packet buffer + counter -> input FIFO -> address
//                     mapper (NAM) -> 8x8 RAM banks (one line per pixel,
//                     bank = {y[2:0], x[2:0]}) -> data mapper (NDM)
//   2 noise removal   background activity filter over the 3x3 neighbourhood
//   3 decompression   prefix adder + decompression unit per region
//   4 histogram       compare/shift and element counter per region
//   5 write back      the event's own shifted line goes back to its bank (DDM)
//   6 output          one FIFO per region, popped together
//
// Timing: an event leaves the input FIFO in cycle t and its bank reads are
// issued; in cycle t+1 its lines arrive, are put in neighbourhood order, pass
// the noise filter and are registered (stage 1/2 to stage 3 register); in
// cycle t+2 stages 3-5 run combinationally, the event's own line is written
// back and, unless the event is noise, its bins are pushed, so the histogram
// can be popped from cycle t+3. One event is accepted per cycle while the
// output FIFOs have room for it and the two in flight; otherwise the input
// side stalls. Events off the sensor are dropped.
//
// Two forwarding paths keep back-to-back events exact. The event one step
// ahead writes its line at the end of the cycle in which this event's lines
// arrive, so a region holding that pixel takes the line being written; the
// event two steps ahead wrote at the edge where this event's banks were read,
// which the last-write bypass in event_memory covers. The register after
// stage 2, stages 3-5 sharing one cycle and both forwarding paths are this
// design's choices; the source pipelines the stages but gives no register
// placement or hazard handling.
//
// Timestamps are quantised by TS_SHIFT (time unit 2^TS_SHIFT us). Memory line
// width is W_DATA*PN; the stored timestamp keeps
// W_TS = W_DATA*PN - HS*W_DT - SIZE_W bits (4 with the defaults).
module parahist_top #(
  parameter int unsigned R              = 1,
  parameter int unsigned HS             = 16,
  parameter int unsigned W_DT           = 4,
  parameter int unsigned W_DATA         = 72,
  parameter int unsigned PN             = 1,
  parameter int unsigned SIZE_W         = parahist_pkg::floor_log2(HS),
  parameter int unsigned SENSOR_W       = 240,
  parameter int unsigned SENSOR_H       = 180,
  parameter int unsigned TS_SHIFT       = 0,
  parameter int unsigned IN_FIFO_DEPTH  = 16,
  parameter int unsigned OUT_FIFO_DEPTH = 16,
  parameter int unsigned PKT_DEPTH      = 90000,
  // derived
  parameter int unsigned NR      = (2 * R + 1) * (2 * R + 1),
  parameter int unsigned CNT_W   = $clog2(HS + 2),
  parameter int unsigned PKT_AW  = $clog2(PKT_DEPTH + 1),
  parameter int unsigned TIME_W  = parahist_pkg::TIME_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // event packet load and control
  input  logic                      ld_en,
  input  logic [PKT_AW-1:0]         ld_addr,
  input  parahist_pkg::aer_event_t  ld_data,
  input  logic                      start,
  input  logic [PKT_AW-1:0]         pkt_len,
  output logic                      pkt_busy,
  output logic                      pkt_done,
  // run-time thresholds, in quantised time units
  input  logic [TIME_W-1:0]         cfg_threshold,  // outlier threshold
  input  logic [TIME_W-1:0]         cfg_dtn,        // noise threshold
  // histogram output (stage 6): all region FIFOs are popped together
  output logic                      hist_valid,
  output logic [CNT_W-1:0]          hist_bin [NR],
  input  logic                      hist_pop,
  output logic                      idle,
  // statistics
  output logic [31:0]               stat_events,
  output logic [31:0]               stat_noise,
  output logic [31:0]               stat_offsensor,
  output logic [31:0]               stat_bypass,
  output logic [31:0]               stat_stall
);
  import parahist_pkg::*;

  localparam int unsigned LINE_W  = W_DATA * PN;
  localparam int unsigned DEPTH   = ((SENSOR_W + 7) / 8) * ((SENSOR_H + 7) / 8);
  localparam int unsigned LINE_AW = $clog2(DEPTH);
  localparam int unsigned D       = 2 * R + 1;
  localparam int unsigned CENTER  = NR / 2;

  // ---------------- stage 1: packet reader and input FIFO ----------------
  logic       ep_valid, ep_ready;
  aer_event_t ep_data;

  event_packet_reader #(.PKT_DEPTH(PKT_DEPTH), .AW(PKT_AW)) u_ep (
    .clk, .rst_n, .ld_en, .ld_addr, .ld_data, .start, .pkt_len,
    .busy(pkt_busy), .done(pkt_done), .evt_count(),
    .out_valid(ep_valid), .out_data(ep_data), .out_ready(ep_ready)
  );

  logic       in_full, in_empty, in_pop;
  aer_event_t in_head;

  assign ep_ready = !in_full;

  sync_fifo #(.WIDTH(AER_W), .DEPTH(IN_FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n, .push(ep_valid && !in_full), .wr_data(ep_data), .pop(in_pop),
    .rd_data(in_head), .full(in_full), .empty(in_empty), .count()
  );

  // ---------------- stage 1: issue the neighbourhood read ----------------
  logic                    stall, issue, head_on_sensor;
  logic [N_BANKS-1:0]      rd_en;
  logic [LINE_AW-1:0]      rd_addr [N_BANKS];
  logic [5:0]              head_bank_unused;
  logic [LINE_AW-1:0]      head_addr_unused;
  logic [$clog2(OUT_FIFO_DEPTH+1)-1:0] out_count;
  logic                    s1_valid, s2_valid;
  logic [X_W-1:0]          s2_x;
  logic [Y_W-1:0]          s2_y;

  // room for the events in flight plus the one issued now
  assign stall = (32'(out_count) + 32'(s1_valid) + 32'(s2_valid) + 1 > OUT_FIFO_DEPTH);
  assign issue = !in_empty && !stall;
  assign in_pop = issue;

  addr_demapper #(.SENSOR_W(SENSOR_W), .SENSOR_H(SENSOR_H), .LINE_AW(LINE_AW)) u_adm_head (
    .x(in_head.x_addr), .y(in_head.y_addr), .bank(head_bank_unused),
    .line_addr(head_addr_unused), .in_range(head_on_sensor)
  );

  nbr_addr_mapper #(.R(R), .SENSOR_W(SENSOR_W), .SENSOR_H(SENSOR_H), .LINE_AW(LINE_AW)) u_nam (
    .ev_valid(issue && head_on_sensor), .x(in_head.x_addr), .y(in_head.y_addr),
    .rd_en(rd_en), .rd_addr(rd_addr)
  );

  logic [X_W-1:0]    s1_x;
  logic [Y_W-1:0]    s1_y;
  logic [TIME_W-1:0] s1_tsc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_x     <= '0;
      s1_y     <= '0;
      s1_tsc   <= '0;
    end else begin
      s1_valid <= issue && head_on_sensor;
      if (issue) begin
        s1_x   <= in_head.x_addr;
        s1_y   <= in_head.y_addr;
        s1_tsc <= in_head.timestamp >> TS_SHIFT;
      end
    end
  end

  // ---------------- event memory ----------------
  logic [LINE_W-1:0]  bank_data [N_BANKS];
  logic [N_BANKS-1:0] bank_valid;
  logic [N_BANKS-1:0] wr_en;
  logic [LINE_AW-1:0] wr_addr;
  logic [LINE_W-1:0]  wr_data;
  logic               fwd_hit;

  event_memory #(.LINE_W(LINE_W), .DEPTH(DEPTH), .LINE_AW(LINE_AW)) u_mem (
    .clk, .rst_n, .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(bank_data),
    .rd_valid(bank_valid), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .fwd_hit(fwd_hit)
  );

  logic [LINE_W-1:0] ndm_line [NR];
  logic [NR-1:0]     ndm_valid;

  nbr_data_mapper #(.R(R), .LINE_W(LINE_W), .NR(NR)) u_ndm (
    .x_lo(s1_x[2:0]), .y_lo(s1_y[2:0]), .bank_data(bank_data), .bank_valid(bank_valid),
    .region_line(ndm_line), .region_valid(ndm_valid)
  );

  // Forwarding from stage 5: the event one step ahead (in s2) writes its own
  // line at the end of this cycle, after this event's banks were read. A
  // region holding that pixel takes the new line instead.
  logic [LINE_W-1:0] wb_line;
  logic [LINE_W-1:0] region_line [NR];
  logic [NR-1:0]     region_valid;
  logic [NR-1:0]     region_fwd;

  for (genvar k = 0; k < NR; k++) begin : g_fwd
    localparam int DX = int'(k % D) - int'(R);
    localparam int DY = int'(k / D) - int'(R);
    always_comb begin
      region_fwd[k]   = s2_valid && ndm_valid[k] &&
                        (int'(s1_x) + DX == int'(s2_x)) && (int'(s1_y) + DY == int'(s2_y));
      region_line[k]  = region_fwd[k] ? wb_line : ndm_line[k];
      region_valid[k] = ndm_valid[k];
    end
  end

  // ---------------- stage 2: noise removal ----------------
  logic [LINE_W-1:0] nf_line [9];
  logic [8:0]        nf_valid;
  logic              nf_pass;

  for (genvar k = 0; k < 9; k++) begin : g_nf
    localparam int unsigned RIDX = ((k / 3) + R - 1) * D + (k % 3) + R - 1;
    assign nf_line[k]  = region_line[RIDX];
    assign nf_valid[k] = region_valid[RIDX];
  end

  noise_filter #(.LINE_W(LINE_W), .HS(HS), .W_DT(W_DT), .SIZE_W(SIZE_W), .TIME_W(TIME_W)) u_nf (
    .line_in(nf_line), .line_valid(nf_valid), .tsc(s1_tsc), .dtn(cfg_dtn),
    .recent(), .pass(nf_pass)
  );

  // stage 2 / stage 3 pipeline register
  logic [TIME_W-1:0] s2_tsc;
  logic              s2_pass;
  logic [LINE_W-1:0] s2_line [NR];
  logic [NR-1:0]     s2_lvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid  <= 1'b0;
      s2_pass   <= 1'b0;
      s2_x      <= '0;
      s2_y      <= '0;
      s2_tsc    <= '0;
      s2_lvalid <= '0;
    end else begin
      s2_valid <= s1_valid;
      if (s1_valid) begin
        s2_pass   <= nf_pass;
        s2_x      <= s1_x;
        s2_y      <= s1_y;
        s2_tsc    <= s1_tsc;
        s2_lvalid <= region_valid;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (s1_valid) s2_line <= region_line;
  end

  // ---------------- stages 3 and 4: one lane per region ----------------
  logic [CNT_W-1:0]  bin       [NR];
  logic [LINE_W-1:0] lane_line [NR];

  for (genvar k = 0; k < NR; k++) begin : g_lane
    region_unit #(
      .LINE_W(LINE_W), .HS(HS), .W_DT(W_DT), .SIZE_W(SIZE_W), .TIME_W(TIME_W), .CNT_W(CNT_W)
    ) u_region (
      .line_valid(s2_lvalid[k]), .line_in(s2_line[k]), .tsc(s2_tsc),
      .threshold(cfg_threshold), .count(bin[k]), .line_out(lane_line[k])
    );
  end

  // ---------------- stage 5: write back of the event's own line ----------------
  logic [5:0]         s2_bank;
  logic [LINE_AW-1:0] s2_addr;
  logic               s2_on_sensor_unused;

  assign wb_line = lane_line[CENTER];

  addr_demapper #(.SENSOR_W(SENSOR_W), .SENSOR_H(SENSOR_H), .LINE_AW(LINE_AW)) u_adm_wb (
    .x(s2_x), .y(s2_y), .bank(s2_bank), .line_addr(s2_addr), .in_range(s2_on_sensor_unused)
  );

  data_demapper #(.LINE_W(LINE_W), .LINE_AW(LINE_AW)) u_ddm (
    .wb_valid(s2_valid), .wb_bank(s2_bank), .wb_addr(s2_addr), .wb_line(wb_line),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data)
  );

  // ---------------- stage 6: output FIFOs ----------------
  logic          hist_push;
  logic [NR-1:0] out_empty;

  assign hist_push = s2_valid && s2_pass;

  for (genvar k = 0; k < NR; k++) begin : g_out
    // all FIFOs hold the same number of entries; the first one's count is used
    if (k == 0) begin : g_first
      sync_fifo #(.WIDTH(CNT_W), .DEPTH(OUT_FIFO_DEPTH)) u_out_fifo (
        .clk, .rst_n, .push(hist_push), .wr_data(bin[k]), .pop(hist_pop && hist_valid),
        .rd_data(hist_bin[k]), .full(), .empty(out_empty[k]), .count(out_count)
      );
    end else begin : g_other
      sync_fifo #(.WIDTH(CNT_W), .DEPTH(OUT_FIFO_DEPTH)) u_out_fifo (
        .clk, .rst_n, .push(hist_push), .wr_data(bin[k]), .pop(hist_pop && hist_valid),
        .rd_data(hist_bin[k]), .full(), .empty(out_empty[k]), .count()
      );
    end
  end

  assign hist_valid = !out_empty[0];
  assign idle = !pkt_busy && !ep_valid && in_empty && !s1_valid && !s2_valid;

  // ---------------- statistics ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_events    <= '0;
      stat_noise     <= '0;
      stat_offsensor <= '0;
      stat_bypass    <= '0;
      stat_stall     <= '0;
    end else begin
      if (s2_valid)                          stat_events    <= stat_events + 1;
      if (s2_valid && !s2_pass)              stat_noise     <= stat_noise + 1;
      if (issue && !head_on_sensor)          stat_offsensor <= stat_offsensor + 1;
      if (s1_valid && (fwd_hit || |region_fwd)) stat_bypass <= stat_bypass + 1;
      if (!in_empty && stall)                stat_stall     <= stat_stall + 1;
    end
  end

  // the output FIFOs move in lockstep
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (out_empty == '0) || (out_empty == '1));
endmodule
