// dma_top: accelerated DMA controller with an AXI4 master per direction.
//
// Two identical engines stand side by side, as in the controller's overall
// structure: option 0 (the "write option") and option 1 (the "read option").
// Each has eight channels, its own local memory, descriptor splitter, channel
// monitor with fixed-priority arbitration, command parser, read data mover,
// CRC16-CCITT parser, write data mover and status queue, and its own AXI4
// master (read channels for the source, write channels for the destination).
// One CPU register block (see dma_regs) enables the engines, fills their
// local memories, submits requests and reads completions. A hardware device
// can submit requests directly on hw_req_* (index = option). irq[i] is high
// while option i holds an unread completion.
//
// Giving each option its own local memory, rather than one shared memory, is
// this design's choice.
module dma_top
  import dma_pkg::*;
#(
  parameter int unsigned LM_DEPTH  = 1024,
  parameter int unsigned CH_DEPTH  = 16,
  parameter int unsigned PAGE_DW   = 1024,
  parameter int unsigned BUF_DEPTH = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU register port
  input  logic              cpu_wr,
  input  logic [7:0]        cpu_addr,
  input  logic [31:0]       cpu_wdata,
  output logic [31:0]       cpu_rdata,
  output logic [1:0]        irq,
  // hardware-device requests
  input  logic [1:0]        hw_req_valid,
  output logic [1:0]        hw_req_ready,
  input  dma_req_t [1:0]    hw_req,
  // AXI4 masters, index = option
  output logic [1:0]        arvalid,
  input  logic [1:0]        arready,
  output axi_ax_t [1:0]     ar,
  input  logic [1:0]        rvalid,
  output logic [1:0]        rready,
  input  axi_r_t [1:0]      r,
  output logic [1:0]        awvalid,
  input  logic [1:0]        awready,
  output axi_ax_t [1:0]     aw,
  output logic [1:0]        wvalid,
  input  logic [1:0]        wready,
  output axi_w_t [1:0]      w,
  input  logic [1:0]        bvalid,
  output logic [1:0]        bready,
  input  axi_b_t [1:0]      b
);
  logic [1:0]          cfg_en, lm_req, lm_gnt, sub_valid, sub_ready;
  logic [1:0]          cpl_valid, cpl_pop, split_busy;
  lm_addr_t            lm_addr;
  data_t               lm_wdata;
  dma_req_t            sub_req;
  cpl_t [1:0]          cpl;
  logic [1:0][NCH-1:0] bmp;
  logic [31:0]         done_cnt [2];

  dma_regs u_regs (
    .clk, .rst_n, .cpu_wr, .cpu_addr, .cpu_wdata, .cpu_rdata, .cfg_en,
    .lm_req, .lm_addr, .lm_wdata, .lm_gnt,
    .sub_valid, .sub_ready, .sub_req,
    .cpl_valid, .cpl, .cpl_pop, .bmp, .split_busy
  );

  for (genvar o = 0; o < 2; o++) begin : g_opt
    dma_engine #(
      .LM_DEPTH(LM_DEPTH), .CH_DEPTH(CH_DEPTH), .PAGE_DW(PAGE_DW), .BUF_DEPTH(BUF_DEPTH)
    ) u_eng (
      .clk, .rst_n, .cfg_en(cfg_en[o]),
      .cpu_lm_req(lm_req[o]), .cpu_lm_addr(lm_addr), .cpu_lm_wdata(lm_wdata),
      .cpu_lm_gnt(lm_gnt[o]),
      .cpu_req_valid(sub_valid[o]), .cpu_req_ready(sub_ready[o]), .cpu_req(sub_req),
      .hw_req_valid(hw_req_valid[o]), .hw_req_ready(hw_req_ready[o]), .hw_req(hw_req[o]),
      .cpl_valid(cpl_valid[o]), .cpl(cpl[o]), .cpl_pop(cpl_pop[o]), .irq(irq[o]),
      .done_cnt(done_cnt[o]), .bmp(bmp[o]), .split_busy(split_busy[o]),
      .arvalid(arvalid[o]), .arready(arready[o]), .ar(ar[o]),
      .rvalid(rvalid[o]), .rready(rready[o]), .r(r[o]),
      .awvalid(awvalid[o]), .awready(awready[o]), .aw(aw[o]),
      .wvalid(wvalid[o]), .wready(wready[o]), .w(w[o]),
      .bvalid(bvalid[o]), .bready(bready[o]), .b(b[o])
    );
  end
endmodule
