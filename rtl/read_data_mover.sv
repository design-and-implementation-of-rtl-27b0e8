// read_data_mover: fetches the entries of each command and reads their data.
//
// Command records from the command parser wait in the DMA command buffer. The
// entry read request logic reads a command's entries from local memory one at
// a time into the entry buffer. The bulk data read request logic takes one
// entry at a time, queues its beat count and flags for the completion side
// (the data parameter buffer), and
// issues AXI4 INCR read bursts of at most MAX_BURST beats that never cross a
// 4 KiB boundary. The bulk data read completion logic tags each returning beat
// with the end-of-entry and end-of-command flags and the command's CRC check
// fields and a read-error flag (response other than OKAY), and stores it in
// the bulk data buffer, from which it streams to the
// CRC parser. The write data mover fetches the same entries for itself (see
// wdm_entry_fetch), so only data and flags leave this block.
//
// Flow control: a burst is only requested when the bulk data buffer has room
// for every beat already in flight plus the new burst, so RREADY is never held
// low for lack of space. One read ID is used and data returns in order. The
// block split follows the document's read-data-mover diagram; the 64-beat bulk
// buffer depth matches the 6-bit buffer address seen in the document's
// simulation waveform; burst size, buffer depths of 4 for the other buffers
// and the credit scheme are this design's choices.
module read_data_mover
  import dma_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 64,  // bulk data buffer, beats
  parameter int unsigned Q_DEPTH   = 4    // command/entry/parameter buffers
) (
  input  logic     clk,
  input  logic     rst_n,
  // command in
  input  logic     cmd_valid,
  output logic     cmd_ready,
  input  cmd_rec_t cmd,
  // local memory read port (entries)
  output logic     lm_req,
  output lm_addr_t lm_addr,
  input  logic     lm_gnt,
  input  logic     lm_rvalid,
  input  data_t    lm_rdata,
  // AXI4 read address / data
  output logic     arvalid,
  input  logic     arready,
  output axi_ax_t  ar,
  input  logic     rvalid,
  output logic     rready,
  input  axi_r_t   r,
  // to the CRC parser
  output logic     out_valid,
  input  logic     out_ready,
  output rbeat_t   out_beat
);
  typedef struct packed {
    entry_t      e;
    logic        crc_chk;
    logic [15:0] crc_exp;
  } ebuf_t;

  typedef struct packed {
    len_t        beats;
    logic        eobulk;
    logic        crc_chk;
    logic [15:0] crc_exp;
  } dparam_t;

  localparam int unsigned CW = $clog2(BUF_DEPTH) + 1;

  // ---------------- DMA command buffer -----------------------------------
  logic     cq_valid, cq_pop;
  cmd_rec_t cq;

  sync_fifo #(.T(cmd_rec_t), .DEPTH(Q_DEPTH)) u_cmd_buf (
    .clk, .rst_n, .in_valid(cmd_valid), .in_ready(cmd_ready), .in_data(cmd),
    .out_valid(cq_valid), .out_ready(cq_pop), .out_data(cq), .count()
  );

  // ---------------- entry read request / completion ----------------------
  typedef enum logic [1:0] {E_IDLE, E_REQ, E_WAIT} estate_t;
  estate_t  es;
  len_t     eidx;
  logic     eb_in_ready, eb_valid, eb_pop;
  ebuf_t    eb_in, eb;

  assign lm_req  = (es == E_REQ);
  assign lm_addr = cq.entry_addr + lm_addr_t'(eidx);
  assign cq_pop  = (es == E_WAIT) && lm_rvalid && (eidx == cq.entry_num - 1'b1);

  always_comb begin
    eb_in.e       = entry_t'(lm_rdata);
    eb_in.crc_chk = cq.crc_chk;
    eb_in.crc_exp = cq.crc_exp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      es   <= E_IDLE;
      eidx <= '0;
    end else begin
      unique case (es)
        E_IDLE: if (cq_valid && eb_in_ready) es <= E_REQ;
        E_REQ:  if (lm_gnt) es <= E_WAIT;
        E_WAIT: if (lm_rvalid) begin
          es   <= E_IDLE;
          eidx <= cq_pop ? '0 : eidx + 1'b1;
        end
        default: es <= E_IDLE;
      endcase
    end
  end

  sync_fifo #(.T(ebuf_t), .DEPTH(Q_DEPTH)) u_entry_buf (
    .clk, .rst_n, .in_valid((es == E_WAIT) && lm_rvalid), .in_ready(eb_in_ready),
    .in_data(eb_in), .out_valid(eb_valid), .out_ready(eb_pop), .out_data(eb),
    .count()
  );

  // ---------------- bulk data read request -------------------------------
  logic     dp_in_ready, dp_valid, dp_pop;
  dparam_t  dp_in, dp;
  logic     br_busy;
  addr_t    br_addr;
  len_t     br_left, burst, to_4k;
  logic [CW-1:0] inflight;
  logic     ar_fire, out_fire;

  assign eb_pop = !br_busy && eb_valid && dp_in_ready;

  always_comb begin
    dp_in.beats   = eb.e.dw_len >> 2;
    dp_in.eobulk  = eb.e.eobulk;
    dp_in.crc_chk = eb.crc_chk;
    dp_in.crc_exp = eb.crc_exp;
  end

  assign to_4k = len_t'((16'h1000 - {4'b0, br_addr[11:0]}) >> 4);
  always_comb begin
    burst = br_left;
    if (burst > len_t'(MAX_BURST)) burst = len_t'(MAX_BURST);
    if (burst > to_4k)             burst = to_4k;
  end

  assign arvalid  = br_busy && (32'(inflight) + 32'(burst) <= BUF_DEPTH);
  assign ar_fire  = arvalid && arready;
  assign ar.id    = '0;
  assign ar.addr  = br_addr;
  assign ar.len   = 8'(burst - 1'b1);
  assign ar.size  = AXI_SIZE_16B;
  assign ar.burst = AXI_BURST_INCR;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      br_busy <= 1'b0;
      br_addr <= '0;
      br_left <= '0;
    end else if (eb_pop) begin
      br_busy <= 1'b1;
      br_addr <= eb.e.src;
      br_left <= eb.e.dw_len >> 2;
    end else if (ar_fire) begin
      br_addr <= br_addr + addr_t'({burst, 4'b0000});
      br_left <= br_left - burst;
      if (br_left == burst) br_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + (ar_fire ? CW'(burst) : '0) - (out_fire ? CW'(1) : '0);
  end

  sync_fifo #(.T(dparam_t), .DEPTH(Q_DEPTH)) u_data_param_buf (
    .clk, .rst_n, .in_valid(eb_pop), .in_ready(dp_in_ready), .in_data(dp_in),
    .out_valid(dp_valid), .out_ready(dp_pop), .out_data(dp), .count()
  );

  // ---------------- bulk data read completion ----------------------------
  len_t   bcnt;
  logic   bb_in_ready, r_fire;
  rbeat_t bb_in;

  assign rready = dp_valid && bb_in_ready;
  assign r_fire = rvalid && rready;
  assign dp_pop = r_fire && (bcnt == dp.beats - 1'b1);

  always_comb begin
    bb_in.data    = r.data;
    bb_in.last    = (bcnt == dp.beats - 1'b1);
    bb_in.eobulk  = bb_in.last && dp.eobulk;
    bb_in.crc_chk = dp.crc_chk;
    bb_in.crc_exp = dp.crc_exp;
    bb_in.rerr    = (r.resp != AXI_RESP_OKAY);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      bcnt <= '0;
    else if (r_fire) bcnt <= dp_pop ? '0 : bcnt + 1'b1;
  end

  sync_fifo #(.T(rbeat_t), .DEPTH(BUF_DEPTH)) u_bulk_buf (
    .clk, .rst_n, .in_valid(r_fire), .in_ready(bb_in_ready), .in_data(bb_in),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_beat), .count()
  );

  assign out_fire = out_valid && out_ready;

  // Entries carry whole beats; a command carries at least one entry.
  assert property (@(posedge clk) disable iff (!rst_n)
                   eb_pop |-> (eb.e.dw_len != '0 && eb.e.dw_len[1:0] == 2'b00));
  assert property (@(posedge clk) disable iff (!rst_n)
                   cmd_valid |-> cmd.entry_num != '0);
endmodule
