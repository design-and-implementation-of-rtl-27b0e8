// tb_write_data_mover: writes to an AXI memory model and completion records.
// 60 random commands of 1..4 entries (4..256 dwords, destinations that
// may cross 4 KiB) are fed as write parameters plus data beats with random
// gaps, into a slave with random stalls. Checked: every destination word,
// bursts of at most 16 beats inside one 4 KiB page, one completion per command
// with its channel, tag, the CRC and CRC-error flag carried by the last beat,
// the number of entries flagged end-of-chunk, and the response-error flag for
// commands that touch the slave's error window or carry a beat flagged with a
// read error; the completion must come only
// after all write responses. The CHUNKEND state must be visited.
`timescale 1ns/1ps
module tb_write_data_mover;
  import dma_pkg::*;
  localparam int WORDS = 16384;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic wp_valid, wp_ready, in_valid, in_ready, awvalid, awready, wvalid, wready, bvalid, bready;
  logic cpl_valid, cpl_ready;
  wparam_t wp;
  cbeat_t in_beat;
  axi_ax_t aw;
  axi_w_t w;
  axi_b_t b;
  cpl_t cpl;
  int checks = 0, failures = 0;

  write_data_mover dut (.*);

  logic arvalid = 0, rready = 0, arready, rvalid;
  axi_ax_t ar = '0;
  axi_r_t r;
  axi_mem_model #(.WORDS(WORDS)) u_mem (
    .clk, .rst_n, .stall(1'b0), .rnd_ready(1'b1), .err_lo(8000), .err_hi(8001),
    .arvalid, .arready, .ar, .rvalid, .rready, .r,
    .awvalid, .awready, .aw, .wvalid, .wready, .w, .bvalid, .bready, .b);

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  data_t exp_mem [WORDS];
  bit    touched [WORDS];
  cpl_t  exp_cpl [$];
  int    bursts_open = 0, n_chunkend = 0, ncpl = 0;

  always @(posedge clk) if (rst_n) begin
    cpl_ready <= $urandom % 2;
    if (awvalid && awready) begin
      chk(aw.len < 16 && (int'(aw.addr[11:0]) + 16*(int'(aw.len) + 1)) <= 4096, "write burst limits");
      bursts_open++;
    end
    if (bvalid && bready) bursts_open--;
    if (dut.state == dut.C_EGRESS_CHUNKEND) n_chunkend++;
    if (cpl_valid && cpl_ready) begin
      cpl_t e;
      e = exp_cpl.pop_front();
      chk(cpl == e, $sformatf("completion tag %0d: got crc %h err %b%b chunks %0d", e.tag, cpl.crc,
          cpl.crc_err, cpl.resp_err, cpl.chunks));
      chk(bursts_open == 0 && !(awvalid && awready), "completion after all responses");
      ncpl++;
    end
  end

  // data beats and parameters are fed by two independent processes
  wparam_t pq [$];
  cbeat_t  bq [$];
  initial begin
    wp_valid = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (pq.size() > 0 && ($urandom % 3 != 0)) begin
        wp_valid = 1; wp = pq[0];
        while (!wp_ready) @(negedge clk);
        @(posedge clk); #0.1;
        void'(pq.pop_front());
        wp_valid = 0;
      end
    end
  end
  initial begin
    in_valid = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (bq.size() > 0 && ($urandom % 4 != 0)) begin
        in_valid = 1; in_beat = bq[0];
        while (!in_ready) @(negedge clk);
        @(posedge clk); #0.1;
        void'(bq.pop_front());
        in_valid = 0;
      end
    end
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      u_mem.mem[i] = '0; exp_mem[i] = '0; touched[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 60; c++) begin
      automatic int ne = 1 + $urandom % 4;
      automatic cpl_t ec = '0;
      ec.ch = ch_t'($urandom); ec.tag = 8'(c); ec.crc = 16'($urandom); ec.crc_err = $urandom % 2;
      for (int k = 0; k < ne; k++) begin
        automatic wparam_t p;
        automatic int beats = 1 + $urandom % 64;
        automatic int base = (c % 3 == 2 && k == 0) ? 7990 : $urandom % (WORDS - 64);
        p.dst = 32'(16 * base); p.dw_len = len_t'(4 * beats);
        p.eochunk = $urandom % 2; p.eobulk = (k == ne - 1); p.ch = ec.ch; p.tag = ec.tag;
        if (p.eochunk) ec.chunks++;
        pq.push_back(p);
        for (int bt = 0; bt < beats; bt++) begin
          automatic cbeat_t cb = '0;
          cb.data = {$urandom, $urandom, $urandom, $urandom};
          cb.last = (bt == beats - 1);
          cb.eobulk = cb.last && p.eobulk;
          if (cb.eobulk) begin cb.crc = ec.crc; cb.crc_err = ec.crc_err; end
          else begin cb.crc = 16'($urandom); cb.crc_err = $urandom % 2; end
          exp_mem[base + bt] = cb.data;
          touched[base + bt] = 1;
          if (base + bt >= 8000 && base + bt <= 8001) ec.resp_err = 1;
          cb.rerr = (c % 7 == 3) && ($urandom % 16 == 0);
          if (cb.rerr) ec.resp_err = 1;
          bq.push_back(cb);
        end
      end
      exp_cpl.push_back(ec);
      // let this command finish before the next so overlapping destinations stay ordered
      while (exp_cpl.size() > 0) @(posedge clk);
    end
    for (int i = 0; i < WORDS; i++)
      if (touched[i] && u_mem.mem[i] != exp_mem[i]) chk(0, $sformatf("memory word %0d", i));
    chk(ncpl == 60, "all completions");
    chk(n_chunkend > 0, "CHUNKEND visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
