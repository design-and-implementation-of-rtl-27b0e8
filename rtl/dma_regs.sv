// dma_regs: CPU register block of the controller.
//
// A simple synchronous register port (write strobe with address and data;
// read data is combinational from the address). Option 0 is the write option,
// option 1 the read option; each has its own engine. Register map (byte
// addresses):
//   0x00 CTRL      [0] enable option 0, [1] enable option 1 (cfg_dmaacc_en)
//   0x04 LM_ADDR   [15:0] local-memory word address, [31] option
//   0x08-0x14      LM_WDATA0..3, 128-bit word to write (WDATA0 = bits 31:0)
//   0x18 LM_GO     write: write the word into local memory; read [0]: busy
//   0x1C SUBMIT    write: queue request [15:0] descriptor address,
//                  [18:16] channel, [31] option; read [0]: busy
//   0x20 CPL0_LO   read: [31:16] CRC, [15:8] tag, [7:5] channel,
//                  [2] CRC error, [1] response error, [0] valid;
//                  write: remove the head completion of option 0
//   0x24 CPL0_HI   read: [15:0] LBA chunks
//   0x28 CPL1_LO, 0x2C CPL1_HI  the same for option 1
//   0x30 STATUS    [7:0] pending channels option 0, [15:8] option 1,
//                  [16]/[17] splitter busy option 0/1
// A local-memory write or a submission stays pending until the engine takes
// it; a second one written meanwhile is ignored. The document names the
// register module only; the map is this design's own.
module dma_regs
  import dma_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cpu_wr,
  input  logic [7:0]           cpu_addr,
  input  logic [31:0]          cpu_wdata,
  output logic [31:0]          cpu_rdata,
  output logic [1:0]           cfg_en,
  // local-memory write window
  output logic [1:0]           lm_req,
  output lm_addr_t             lm_addr,
  output data_t                lm_wdata,
  input  logic [1:0]           lm_gnt,
  // request submission
  output logic [1:0]           sub_valid,
  input  logic [1:0]           sub_ready,
  output dma_req_t             sub_req,
  // completions
  input  logic [1:0]           cpl_valid,
  input  cpl_t [1:0]           cpl,
  output logic [1:0]           cpl_pop,
  // status
  input  logic [1:0][NCH-1:0]  bmp,
  input  logic [1:0]           split_busy
);
  logic        lm_opt, lm_pend, sub_opt, sub_pend;
  logic [31:0] wd [4];

  assign lm_req    = lm_pend ? (lm_opt ? 2'b10 : 2'b01) : 2'b00;
  assign lm_wdata  = {wd[3], wd[2], wd[1], wd[0]};
  assign sub_valid = sub_pend ? (sub_opt ? 2'b10 : 2'b01) : 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_en   <= '0;
      lm_opt   <= 1'b0;
      lm_addr  <= '0;
      lm_pend  <= 1'b0;
      sub_opt  <= 1'b0;
      sub_pend <= 1'b0;
      sub_req  <= '0;
      for (int i = 0; i < 4; i++) wd[i] <= '0;
    end else begin
      if (lm_pend && lm_gnt[lm_opt])       lm_pend  <= 1'b0;
      if (sub_pend && sub_ready[sub_opt])  sub_pend <= 1'b0;
      if (cpu_wr) begin
        unique case (cpu_addr)
          8'h00: cfg_en <= cpu_wdata[1:0];
          8'h04: begin lm_addr <= cpu_wdata[LM_AW-1:0]; lm_opt <= cpu_wdata[31]; end
          8'h08: wd[0] <= cpu_wdata;
          8'h0C: wd[1] <= cpu_wdata;
          8'h10: wd[2] <= cpu_wdata;
          8'h14: wd[3] <= cpu_wdata;
          8'h18: if (!lm_pend) lm_pend <= 1'b1;
          8'h1C: if (!sub_pend) begin
            sub_pend          <= 1'b1;
            sub_opt           <= cpu_wdata[31];
            sub_req.desc_addr <= cpu_wdata[LM_AW-1:0];
            sub_req.ch        <= cpu_wdata[16 +: CHW];
          end
          default: ;
        endcase
      end
    end
  end

  assign cpl_pop[0] = cpu_wr && cpu_addr == 8'h20 && cpl_valid[0];
  assign cpl_pop[1] = cpu_wr && cpu_addr == 8'h28 && cpl_valid[1];

  function automatic logic [31:0] cpl_lo(logic v, cpl_t c);
    return {c.crc, c.tag, c.ch, 2'b00, c.crc_err, c.resp_err, v};
  endfunction

  always_comb begin
    unique case (cpu_addr)
      8'h00:   cpu_rdata = {30'd0, cfg_en};
      8'h04:   cpu_rdata = {lm_opt, 15'd0, lm_addr};
      8'h08:   cpu_rdata = wd[0];
      8'h0C:   cpu_rdata = wd[1];
      8'h10:   cpu_rdata = wd[2];
      8'h14:   cpu_rdata = wd[3];
      8'h18:   cpu_rdata = {31'd0, lm_pend};
      8'h1C:   cpu_rdata = {31'd0, sub_pend};
      8'h20:   cpu_rdata = cpl_lo(cpl_valid[0], cpl[0]);
      8'h24:   cpu_rdata = {16'd0, cpl[0].chunks};
      8'h28:   cpu_rdata = cpl_lo(cpl_valid[1], cpl[1]);
      8'h2C:   cpu_rdata = {16'd0, cpl[1].chunks};
      8'h30:   cpu_rdata = {14'd0, split_busy, bmp[1], bmp[0]};
      default: cpu_rdata = '0;
    endcase
  end
endmodule
