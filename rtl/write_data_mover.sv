// write_data_mover: writes the checked data of each entry to its destination.
//
// For every entry the read data mover queues its write parameters (destination,
// length, end-of-chunk/end-of-command flags). The state machine, whose states
// carry the names of the document's egress diagram, works as follows:
//   EGRESS_IDLE     wait for the first entry of a command, clear its counters
//   EGRESS_INI      load the entry if needed and issue one AXI4 write burst
//                   (at most MAX_BURST beats, never across a 4 KiB boundary)
//   EGRESS_DATA     send that burst's beats from the CRC parser; bulk_dw_cnt
//                   grows by 4 per beat; back to INI for the next burst, or on
//                   to NEXT_SGL once bulk_dw_cnt reaches the entry length
//   EGRESS_NEXT_SGL look at the entry flags: EOBULK -> BULKEND,
//                   EOCHUNK -> CHUNKEND, otherwise the next entry (INI)
//   EGRESS_CHUNKEND count a completed LBA chunk, then INI
//   EGRESS_BULKEND  wait for every write response, then report the command
//                   (channel, tag, CRC, CRC error, response error, chunks)
// Write strobes are all ones (entries are whole 16-byte beats). BREADY is held
// high; write responses are counted, and any write response other than OKAY,
// or a beat whose read had failed (rerr), marks the command with resp_err. Only one burst's data is in flight on W at a time;
// address and data of a burst are not overlapped. These protocol details are
// this design's choices; the document gives the state sequence.
module write_data_mover
  import dma_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // entry parameters
  input  logic    wp_valid,
  output logic    wp_ready,
  input  wparam_t wp,
  // checked data
  input  logic    in_valid,
  output logic    in_ready,
  input  cbeat_t  in_beat,
  // AXI4 write address / data / response
  output logic    awvalid,
  input  logic    awready,
  output axi_ax_t aw,
  output logic    wvalid,
  input  logic    wready,
  output axi_w_t  w,
  input  logic    bvalid,
  output logic    bready,
  input  axi_b_t  b,
  // completion
  output logic    cpl_valid,
  input  logic    cpl_ready,
  output cpl_t    cpl
);
  typedef enum logic [2:0] {
    C_EGRESS_IDLE, C_EGRESS_INI, C_EGRESS_DATA, C_EGRESS_NEXT_SGL,
    C_EGRESS_CHUNKEND, C_EGRESS_BULKEND
  } wstate_t;

  wstate_t     state;
  wparam_t     p;
  logic        have_p;
  addr_t       addr;
  len_t        bulk_dw_cnt, burst, to_4k, left_beats;
  logic [7:0]  wbeats;
  logic [15:0] outstanding;
  logic [15:0] crc_q, chunks;
  logic        crc_err_q, resp_err_q;
  logic        w_fire, aw_fire, b_fire, load;

  assign left_beats = (p.dw_len - bulk_dw_cnt) >> 2;
  assign to_4k      = len_t'((16'h1000 - {4'b0, addr[11:0]}) >> 4);
  always_comb begin
    burst = left_beats;
    if (burst > len_t'(MAX_BURST)) burst = len_t'(MAX_BURST);
    if (burst > to_4k)             burst = to_4k;
  end

  assign load     = ((state == C_EGRESS_IDLE) || (state == C_EGRESS_INI && !have_p)) && wp_valid;
  assign wp_ready = (state == C_EGRESS_IDLE) || (state == C_EGRESS_INI && !have_p);

  assign awvalid  = (state == C_EGRESS_INI) && have_p;
  assign aw.id    = '0;
  assign aw.addr  = addr;
  assign aw.len   = 8'(burst - 1'b1);
  assign aw.size  = AXI_SIZE_16B;
  assign aw.burst = AXI_BURST_INCR;
  assign aw_fire  = awvalid && awready;

  assign wvalid   = (state == C_EGRESS_DATA) && in_valid;
  assign in_ready = (state == C_EGRESS_DATA) && wready;
  assign w.data   = in_beat.data;
  assign w.strb   = '1;
  assign w.last   = (wbeats == 8'd1);
  assign w_fire   = wvalid && wready;

  assign bready   = 1'b1;
  assign b_fire   = bvalid && bready;

  assign cpl_valid    = (state == C_EGRESS_BULKEND) && (outstanding == '0);
  assign cpl.ch       = p.ch;
  assign cpl.tag      = p.tag;
  assign cpl.crc      = crc_q;
  assign cpl.crc_err  = crc_err_q;
  assign cpl.resp_err = resp_err_q;
  assign cpl.chunks   = chunks;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_EGRESS_IDLE;
      p           <= '0;
      have_p      <= 1'b0;
      addr        <= '0;
      bulk_dw_cnt <= '0;
      wbeats      <= '0;
      outstanding <= '0;
      crc_q       <= '0;
      crc_err_q   <= 1'b0;
      resp_err_q  <= 1'b0;
      chunks      <= '0;
    end else begin
      outstanding <= outstanding + (aw_fire ? 16'd1 : 16'd0) - (b_fire ? 16'd1 : 16'd0);
      if (b_fire && b.resp != AXI_RESP_OKAY) resp_err_q <= 1'b1;
      if (load) begin
        p           <= wp;
        have_p      <= 1'b1;
        addr        <= wp.dst;
        bulk_dw_cnt <= '0;
      end
      unique case (state)
        C_EGRESS_IDLE: if (wp_valid) begin
          crc_err_q  <= 1'b0;
          resp_err_q <= 1'b0;
          chunks     <= '0;
          state      <= C_EGRESS_INI;
        end
        C_EGRESS_INI: if (aw_fire) begin
          wbeats <= burst[7:0];
          addr   <= addr + addr_t'({burst, 4'b0000});
          state  <= C_EGRESS_DATA;
        end
        C_EGRESS_DATA: if (w_fire) begin
          bulk_dw_cnt <= bulk_dw_cnt + len_t'(DW_PER_BEAT);
          wbeats      <= wbeats - 1'b1;
          if (in_beat.rerr) resp_err_q <= 1'b1;
          if (in_beat.eobulk) begin
            crc_q     <= in_beat.crc;
            crc_err_q <= in_beat.crc_err;
          end
          if (wbeats == 8'd1)
            state <= (bulk_dw_cnt + len_t'(DW_PER_BEAT) >= p.dw_len) ? C_EGRESS_NEXT_SGL
                                                                     : C_EGRESS_INI;
        end
        C_EGRESS_NEXT_SGL: begin
          have_p <= 1'b0;
          if (p.eochunk) chunks <= chunks + 1'b1;
          state <= p.eobulk  ? C_EGRESS_BULKEND :
                   p.eochunk ? C_EGRESS_CHUNKEND : C_EGRESS_INI;
        end
        C_EGRESS_CHUNKEND: state <= C_EGRESS_INI;
        C_EGRESS_BULKEND: if (cpl_valid && cpl_ready) state <= C_EGRESS_IDLE;
        default: state <= C_EGRESS_IDLE;
      endcase
    end
  end

  // The data stream's entry boundaries must line up with the entry lengths.
  assert property (@(posedge clk) disable iff (!rst_n)
                   w_fire |-> (in_beat.last == (bulk_dw_cnt + len_t'(DW_PER_BEAT) >= p.dw_len)));
  assert property (@(posedge clk) disable iff (!rst_n)
                   w_fire |-> (in_beat.eobulk == (in_beat.last && p.eobulk)));
endmodule
