// wdm_entry_fetch: command buffer and entry fetch of the write data mover.
//
// The write side keeps its own copy of every command record: records wait in
// a command buffer, and the entry request logic reads the command's entries
// from local memory one at a time (request, grant, read data one cycle later)
// and turns each into write parameters (destination, length, end-of-chunk and
// end-of-command flags, channel, tag). These wait in the write parameter
// buffer until the egress state machine of the write data mover takes them.
// The read data mover fetches the same entries independently for the source
// side, so the two movers only meet at the data stream.
//
// Interface: cmd_valid/cmd_ready/cmd in, a read-only local-memory port, and
// wp_valid/wp_ready/wp out, all valid/ready handshakes. An entry costs two
// cycles once its local-memory request is granted.
//
// The document has the write data mover cache the commands from the command
// parser and request the entry information from local memory itself; the
// buffer depths and the one-entry-at-a-time fetch are this design's choices.
module wdm_entry_fetch
  import dma_pkg::*;
#(
  parameter int unsigned Q_DEPTH = 4   // command and parameter buffers
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cmd_valid,
  output logic     cmd_ready,
  input  cmd_rec_t cmd,
  output logic     lm_req,
  output lm_addr_t lm_addr,
  input  logic     lm_gnt,
  input  logic     lm_rvalid,
  input  data_t    lm_rdata,
  output logic     wp_valid,
  input  logic     wp_ready,
  output wparam_t  wp
);
  logic     cq_valid, cq_pop, wp_in_ready;
  cmd_rec_t cq;
  entry_t   e;
  wparam_t  wp_in;
  len_t     eidx;

  typedef enum logic [1:0] {F_IDLE, F_REQ, F_WAIT} fstate_t;
  fstate_t fs;

  sync_fifo #(.T(cmd_rec_t), .DEPTH(Q_DEPTH)) u_cmd_buf (
    .clk, .rst_n, .in_valid(cmd_valid), .in_ready(cmd_ready), .in_data(cmd),
    .out_valid(cq_valid), .out_ready(cq_pop), .out_data(cq), .count()
  );

  assign lm_req  = (fs == F_REQ);
  assign lm_addr = cq.entry_addr + lm_addr_t'(eidx);
  assign cq_pop  = (fs == F_WAIT) && lm_rvalid && (eidx == cq.entry_num - 1'b1);

  always_comb begin
    e             = entry_t'(lm_rdata);
    wp_in.dst     = e.dst;
    wp_in.dw_len  = e.dw_len;
    wp_in.eochunk = e.eochunk;
    wp_in.eobulk  = e.eobulk;
    wp_in.ch      = cq.ch;
    wp_in.tag     = cq.tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs   <= F_IDLE;
      eidx <= '0;
    end else begin
      unique case (fs)
        F_IDLE: if (cq_valid && wp_in_ready) fs <= F_REQ;
        F_REQ:  if (lm_gnt) fs <= F_WAIT;
        F_WAIT: if (lm_rvalid) begin
          fs   <= F_IDLE;
          eidx <= cq_pop ? '0 : eidx + 1'b1;
        end
        default: fs <= F_IDLE;
      endcase
    end
  end

  sync_fifo #(.T(wparam_t), .DEPTH(Q_DEPTH)) u_wparam_buf (
    .clk, .rst_n, .in_valid((fs == F_WAIT) && lm_rvalid), .in_ready(wp_in_ready),
    .in_data(wp_in), .out_valid(wp_valid), .out_ready(wp_ready), .out_data(wp),
    .count()
  );

  // A request is only made when the parameter buffer has room for its answer.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (fs == F_WAIT && lm_rvalid) |-> wp_in_ready);
endmodule
