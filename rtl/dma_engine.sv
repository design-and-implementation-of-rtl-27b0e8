// dma_engine: one complete transfer path of the controller (one "option").
//
// Requests enter the descriptor splitter, which writes split entries and a
// command record per descriptor into local memory and advances the channel's
// write pointer. The channel monitor compares every channel's write pointer
// with its local read pointer; the command parser grants the highest-priority
// pending channel and hands its command record to both data movers in the
// same cycle. The read data mover fetches the entries and reads the data over
// its AXI4 read channels; the data passes the CRC parser. The write data
// mover's own front end (wdm_entry_fetch) fetches the same entries for their
// destinations, and the write data mover writes the data over the AXI4 write
// channels; the finished command is reported in the status queue.
//
// Local-memory ports, highest priority first: 0 CPU window, 1 splitter,
// 2 command parser, 3 read data mover, 4 write data mover. Command rings occupy words
// 0 .. NCH*CH_DEPTH-1; software places descriptors and entry lists above.
module dma_engine
  import dma_pkg::*;
#(
  parameter int unsigned LM_DEPTH  = 1024,  // local memory, 128-bit words
  parameter int unsigned CH_DEPTH  = 16,    // command-ring slots per channel
  parameter int unsigned PAGE_DW   = 1024,  // part-0 boundary in dwords
  parameter int unsigned BUF_DEPTH = 64     // bulk data buffer, beats
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cfg_en,
  // CPU window into local memory
  input  logic           cpu_lm_req,
  input  lm_addr_t       cpu_lm_addr,
  input  data_t          cpu_lm_wdata,
  output logic           cpu_lm_gnt,
  // requests
  input  logic           cpu_req_valid,
  output logic           cpu_req_ready,
  input  dma_req_t       cpu_req,
  input  logic           hw_req_valid,
  output logic           hw_req_ready,
  input  dma_req_t       hw_req,
  // status
  output logic           cpl_valid,
  output cpl_t           cpl,
  input  logic           cpl_pop,
  output logic           irq,
  output logic [31:0]    done_cnt,
  output logic [NCH-1:0] bmp,
  output logic           split_busy,
  // AXI4 master
  output logic           arvalid,
  input  logic           arready,
  output axi_ax_t        ar,
  input  logic           rvalid,
  output logic           rready,
  input  axi_r_t         r,
  output logic           awvalid,
  input  logic           awready,
  output axi_ax_t        aw,
  output logic           wvalid,
  input  logic           wready,
  output axi_w_t         w,
  input  logic           bvalid,
  output logic           bready,
  input  axi_b_t         b
);
  localparam int unsigned PTRW = $clog2(CH_DEPTH) + 1;

  initial assert (NCH * CH_DEPTH < LM_DEPTH)
    else $error("dma_engine: command rings do not fit in local memory");

  // local memory
  logic     [4:0] lm_req, lm_we, lm_gnt, lm_rvalid;
  lm_addr_t [4:0] lm_addr;
  data_t    [4:0] lm_wdata;
  data_t          lm_rdata;

  local_memory #(.DEPTH(LM_DEPTH), .NPORT(5)) u_lm (
    .clk, .rst_n, .req(lm_req), .we(lm_we), .addr(lm_addr), .wdata(lm_wdata),
    .gnt(lm_gnt), .rvalid(lm_rvalid), .rdata(lm_rdata)
  );

  assign lm_req[0]   = cpu_lm_req;
  assign lm_we[0]    = 1'b1;
  assign lm_addr[0]  = cpu_lm_addr;
  assign lm_wdata[0] = cpu_lm_wdata;
  assign cpu_lm_gnt  = lm_gnt[0];

  // splitter
  logic [PTRW-1:0] wptr [NCH];
  logic [PTRW-1:0] rptr [NCH];
  logic [PTRW-1:0] remain [NCH];

  desc_splitter #(.CH_DEPTH(CH_DEPTH), .PAGE_DW(PAGE_DW)) u_split (
    .clk, .rst_n, .cfg_en,
    .cpu_req_valid, .cpu_req_ready, .cpu_req,
    .hw_req_valid, .hw_req_ready, .hw_req,
    .rptr, .wptr,
    .lm_req(lm_req[1]), .lm_we(lm_we[1]), .lm_addr(lm_addr[1]), .lm_wdata(lm_wdata[1]),
    .lm_gnt(lm_gnt[1]), .lm_rvalid(lm_rvalid[1]), .lm_rdata(lm_rdata),
    .busy(split_busy)
  );

  // monitor and command parser
  logic fsm_start;
  ch_t  fsm_ch;

  ch_monitor #(.CH_DEPTH(CH_DEPTH)) u_mon (
    .clk, .rst_n, .wptr, .fsm_start, .fsm_ch, .rptr, .remain, .bmp
  );

  logic     cmd_valid, cmd_ready;
  cmd_rec_t cmd;

  assign lm_we[2]    = 1'b0;
  assign lm_wdata[2] = '0;
  assign lm_we[3]    = 1'b0;
  assign lm_wdata[3] = '0;
  assign lm_we[4]    = 1'b0;
  assign lm_wdata[4] = '0;

  cmd_parser #(.CH_DEPTH(CH_DEPTH)) u_cp (
    .clk, .rst_n, .cfg_en, .bmp, .rptr, .fsm_start, .fsm_ch,
    .lm_req(lm_req[2]), .lm_addr(lm_addr[2]), .lm_gnt(lm_gnt[2]),
    .lm_rvalid(lm_rvalid[2]), .lm_rdata(lm_rdata),
    .cmd_valid, .cmd_ready, .cmd
  );

  // Each command goes to both data movers at once; each keeps its own copy.
  logic rcmd_ready, wcmd_ready;
  assign cmd_ready = rcmd_ready && wcmd_ready;

  // data path
  logic    wp_valid, wp_ready, rb_valid, rb_ready, cb_valid, cb_ready;
  wparam_t wp;
  rbeat_t  rb;
  cbeat_t  cb;

  read_data_mover #(.BUF_DEPTH(BUF_DEPTH)) u_rdm (
    .clk, .rst_n, .cmd_valid(cmd_valid && wcmd_ready), .cmd_ready(rcmd_ready), .cmd,
    .lm_req(lm_req[3]), .lm_addr(lm_addr[3]), .lm_gnt(lm_gnt[3]),
    .lm_rvalid(lm_rvalid[3]), .lm_rdata(lm_rdata),
    .arvalid, .arready, .ar, .rvalid, .rready, .r,
    .out_valid(rb_valid), .out_ready(rb_ready), .out_beat(rb)
  );

  crc_parser u_crc (
    .clk, .rst_n, .in_valid(rb_valid), .in_ready(rb_ready), .in_beat(rb),
    .out_valid(cb_valid), .out_ready(cb_ready), .out_beat(cb)
  );

  logic st_valid, st_ready;
  cpl_t st;

  wdm_entry_fetch u_wfetch (
    .clk, .rst_n, .cmd_valid(cmd_valid && rcmd_ready), .cmd_ready(wcmd_ready), .cmd,
    .lm_req(lm_req[4]), .lm_addr(lm_addr[4]), .lm_gnt(lm_gnt[4]),
    .lm_rvalid(lm_rvalid[4]), .lm_rdata(lm_rdata),
    .wp_valid, .wp_ready, .wp
  );

  write_data_mover u_wdm (
    .clk, .rst_n, .wp_valid, .wp_ready, .wp,
    .in_valid(cb_valid), .in_ready(cb_ready), .in_beat(cb),
    .awvalid, .awready, .aw, .wvalid, .wready, .w, .bvalid, .bready, .b,
    .cpl_valid(st_valid), .cpl_ready(st_ready), .cpl(st)
  );

  dma_status u_status (
    .clk, .rst_n, .in_valid(st_valid), .in_ready(st_ready), .in_cpl(st),
    .head_valid(cpl_valid), .head(cpl), .pop(cpl_pop), .irq, .done_cnt
  );
endmodule
