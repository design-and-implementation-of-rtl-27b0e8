// tb_dma_engine: one engine (one option) end to end, plus its throughput.
// Descriptors are written through the CPU local-memory port and submitted on
// the CPU request port. A reference model here computes the destination
// words, the CRC16-CCITT of the moved stream (bit-serial) and the LBA count.
// Test 1 moves 2048 dwords (32 KiB, two host parts of one page each) with a
// slave that never stalls and measures the data rate on the read channel from
// the first read request to the completion: it must reach at least 0.625 beats
// of 128 bits per cycle, i.e. 40 Gbit/s at a 500 MHz clock. Test 2 moves data
// with metadata across a page boundary with a correct expected CRC, test 3
// with a wrong one, both under random bus stalls; test 4 queues commands on
// channels 6, 1 and 3 at once and expects them served in order 1, 3, 6.
`timescale 1ns/1ps
module tb_dma_engine;
  import dma_pkg::*;
  localparam int PAGE = 1024, WORDS = 65536;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic cfg_en, cpu_lm_req, cpu_lm_gnt, cpu_req_valid, cpu_req_ready, hw_req_valid, hw_req_ready;
  lm_addr_t cpu_lm_addr;
  data_t cpu_lm_wdata;
  dma_req_t cpu_req, hw_req;
  logic cpl_valid, cpl_pop, irq, split_busy;
  cpl_t cpl;
  logic [31:0] done_cnt;
  logic [NCH-1:0] bmp;
  logic arvalid, arready, rvalid, rready, awvalid, awready, wvalid, wready, bvalid, bready;
  axi_ax_t ar, aw;
  axi_r_t r;
  axi_w_t w;
  axi_b_t b;
  logic rnd;
  int checks = 0, failures = 0;

  dma_engine dut (.*);
  axi_mem_model #(.WORDS(WORDS)) u_ddr (
    .clk, .rst_n, .stall(1'b0), .rnd_ready(rnd), .err_lo(-1), .err_hi(-1),
    .arvalid, .arready, .ar, .rvalid, .rready, .r,
    .awvalid, .awready, .aw, .wvalid, .wready, .w, .bvalid, .bready, .b);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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
  bit touched [WORDS];

  function automatic logic [15:0] ref_crc(logic [15:0] c, data_t d);
    for (int by = 0; by < 16; by++)
      for (int i = 7; i >= 0; i--) begin
        logic x = c[15] ^ d[by*8 + i];
        c = c << 1;
        if (x) c ^= 16'h1021;
      end
    return c;
  endfunction

  task automatic model(desc_w0_t w0, desc_w1_t w1, output logic [15:0] crc, output int nl);
    int total = int'(w0.total_dw), lba = int'(w0.lba_dw);
    int part0 = PAGE - ((int'(w0.host0) >> 2) % PAGE);
    crc = 16'hFFFF;
    if (part0 > total) part0 = total;
    nl = (total + lba - 1) / lba;
    for (int k = 0; k < nl; k++) begin
      for (int d = k*lba; d < k*lba + lba && d < total; d += 4) begin
        int sa = (d < part0) ? int'(w0.host0) + 4*d : int'(w0.host1) + 4*(d - part0);
        data_t v = u_ddr.mem[sa >> 4];
        exp_mem[(int'(w0.dst) + 4*d) >> 4] = v;
        touched[(int'(w0.dst) + 4*d) >> 4] = 1;
        crc = ref_crc(crc, v);
      end
      if (w1.meta_vld)
        for (int d = 0; d < int'(w1.meta_dw); d += 4) begin
          int off = 4*(k*int'(w1.meta_dw) + d);
          data_t v = u_ddr.mem[(int'(w1.meta_src) + off) >> 4];
          exp_mem[(int'(w1.meta_dst) + off) >> 4] = v;
          touched[(int'(w1.meta_dst) + off) >> 4] = 1;
          crc = ref_crc(crc, v);
        end
    end
  endtask

  task automatic lm_wr(int a, data_t v);
    @(negedge clk);
    cpu_lm_req = 1; cpu_lm_addr = lm_addr_t'(a); cpu_lm_wdata = v;
    while (!cpu_lm_gnt) @(negedge clk);
    @(negedge clk);
    cpu_lm_req = 0;
  endtask

  task automatic submit(int ch, int da);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req.ch = ch_t'(ch); cpu_req.desc_addr = lm_addr_t'(da);
    while (!cpu_req_ready) @(negedge clk);
    @(negedge clk);
    cpu_req_valid = 0;
  endtask

  // expected completions, in order
  cpl_t exp_q [$];
  task automatic desc(int ch, int da, desc_w0_t w0, desc_w1_t w1, bit wrong_crc, bit go = 1);
    logic [15:0] c;
    int nl;
    cpl_t e = '0;
    model(w0, w1, c, nl);
    w1.crc_chk = 1;
    w1.crc_exp = wrong_crc ? c ^ 16'h8000 : c;
    lm_wr(da, data_t'(w0));
    lm_wr(da + 1, data_t'(w1));
    e.ch = ch_t'(ch); e.tag = w1.tag; e.crc = c; e.crc_err = wrong_crc; e.chunks = 16'(nl);
    exp_q.push_back(e);
    if (go) submit(ch, da);
  endtask

  task automatic drain();
    while (exp_q.size() > 0) begin
      @(negedge clk);
      if (cpl_valid) begin
        cpl_t e;
        e = exp_q.pop_front();
        chk(cpl == e, $sformatf("completion tag %0d: got ch %0d tag %0d crc %h err %b chunks %0d",
            e.tag, cpl.ch, cpl.tag, cpl.crc, cpl.crc_err, cpl.chunks));
        cpl_pop = 1;
        @(negedge clk);
        cpl_pop = 0;
      end
    end
  endtask

  int t_first, t_done;
  initial begin
    desc_w0_t w0;
    desc_w1_t w1;
    cfg_en = 0; cpu_lm_req = 0; cpu_lm_addr = 0; cpu_lm_wdata = 0;
    cpu_req_valid = 0; cpu_req = '0; hw_req_valid = 0; hw_req = '0; cpl_pop = 0; rnd = 0;
    for (int i = 0; i < WORDS; i++) begin
      u_ddr.mem[i] = {$urandom, $urandom, $urandom, $urandom};
      exp_mem[i] = u_ddr.mem[i];
      touched[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg_en = 1;
    // 1. throughput
    w0 = '0; w0.host0 = 32'h0001_0000; w0.host1 = 32'h0002_0000; w0.dst = 32'h0008_0000;
    w0.total_dw = 2048; w0.lba_dw = 1024;
    w1 = '0; w1.sba_list_addr = 200; w1.tag = 1;
    desc(0, 128, w0, w1, 0);
    wait (arvalid);
    t_first = $time;
    wait (cpl_valid);
    t_done = $time;
    begin
      real beats_per_cycle;
      beats_per_cycle = 512.0 / ((t_done - t_first) / 2.0);
      $display("throughput: 512 beats in %0d cycles = %f beats/cycle = %f Gbit/s at 500 MHz",
               (t_done - t_first) / 2, beats_per_cycle, beats_per_cycle * 128.0 * 0.5);
      chk(beats_per_cycle >= 0.625, "data rate of at least 40 Gbit/s at 500 MHz");
    end
    drain();
    // 2./3. metadata and page split, right and wrong CRC, random stalls
    rnd = 1;
    w0 = '0; w0.host0 = 32'h0003_0000 + 4*(PAGE - 24); w0.host1 = 32'h0004_0000; w0.dst = 32'h0009_0000;
    w0.total_dw = 80; w0.lba_dw = 16;
    w1 = '0; w1.sba_list_addr = 210; w1.tag = 2; w1.meta_vld = 1; w1.meta_dw = 8;
    w1.meta_src = 32'h0005_0000; w1.meta_dst = 32'h000A_0000;
    desc(2, 130, w0, w1, 0);
    w0.dst = 32'h000B_0000; w1.meta_dst = 32'h000C_0000; w1.tag = 3; w1.sba_list_addr = 240;
    desc(5, 132, w0, w1, 1);
    drain();
    // 4. three channels pending at once: served 1, 3, 6
    cfg_en = 0;
    w0 = '0; w0.host0 = 32'h0006_0000; w0.total_dw = 64; w0.lba_dw = 32;
    w1 = '0;
    w0.dst = 32'h000D_0000; w1.tag = 10; w1.sba_list_addr = 300; desc(1, 140, w0, w1, 0, 0);
    w0.dst = 32'h000D_1000; w1.tag = 11; w1.sba_list_addr = 310; desc(3, 142, w0, w1, 0, 0);
    w0.dst = 32'h000D_2000; w1.tag = 12; w1.sba_list_addr = 320; desc(6, 144, w0, w1, 0, 0);
    submit(6, 144); submit(3, 142); submit(1, 140);
    cfg_en = 1;
    // the splitter queues 6, 3, 1 in that order; hold the parser until all three wait
    force dut.u_cp.cfg_en = 1'b0;
    wait (bmp == 8'b0100_1010);
    release dut.u_cp.cfg_en;
    drain();
    for (int i = 0; i < WORDS; i++)
      if (touched[i]) chk(u_ddr.mem[i] == exp_mem[i], $sformatf("destination word %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
