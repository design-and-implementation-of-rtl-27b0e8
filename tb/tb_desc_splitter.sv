// tb_desc_splitter: descriptor splitting against an independent entry model.
//
// The testbench plays local memory (with random grant delays) and the channel
// read pointers. It writes descriptors, submits them from the CPU and
// hardware ports and, after each command record appears, compares the record
// and every entry with a list built here directly from the definition: the
// transfer is cut into LBAs, an LBA that crosses the part-0 page boundary
// becomes two pieces (host0 tail, host1 head), each full LBA is followed by a
// metadata entry when enabled, and the flags mark the last entry of each LBA
// and of the command. Covered: whole LBAs, a split LBA, part 0 ending on an
// LBA boundary, a short last LBA, linked descriptors, the hardware port, a
// full two-slot ring that blocks until the read pointer moves, requests held
// while disabled, and 60 random descriptors. PAGE_DW is reduced to 64 dwords so
// that page boundaries occur in short transfers.
`timescale 1ns/1ps
module tb_desc_splitter;
  import dma_pkg::*;
  localparam int PAGE = 64, CD = 2, PW = 2;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic cfg_en, cpu_req_valid, cpu_req_ready, hw_req_valid, hw_req_ready;
  dma_req_t cpu_req, hw_req;
  logic [PW-1:0] rptr [NCH], wptr [NCH];
  logic lm_req, lm_we, lm_gnt, lm_rvalid, busy;
  lm_addr_t lm_addr;
  data_t lm_wdata, lm_rdata;
  int checks = 0, failures = 0;

  desc_splitter #(.CH_DEPTH(CD), .PAGE_DW(PAGE)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // ---- local memory model
  data_t lm [1024];
  logic  gnt_en;
  assign lm_gnt = lm_req && gnt_en;
  always @(posedge clk) begin
    gnt_en <= ($urandom % 3) != 0;
    lm_rvalid <= 0;
    if (lm_req && lm_gnt) begin
      if (lm_we) lm[lm_addr % 1024] = lm_wdata;
      else begin lm_rdata <= lm[lm_addr % 1024]; lm_rvalid <= 1; end
    end
  end

  // ---- reference entry list
  entry_t exp_e [$];
  task automatic ref_entries(desc_w0_t w0, desc_w1_t w1);
    int total = int'(w0.total_dw), lba = int'(w0.lba_dw);
    int part0 = PAGE - ((int'(w0.host0) >> 2) % PAGE);
    int nl;
    if (part0 > total) part0 = total;
    nl = (total + lba - 1) / lba;
    for (int k = 0; k < nl; k++) begin
      int s = k * lba;
      int e = (s + lba < total) ? s + lba : total;
      bit full = (e - s == lba);
      bit with_meta = w1.meta_vld && full;
      int cuts [3];
      int nc = 0;
      cuts[nc++] = s;
      if (s < part0 && e > part0) cuts[nc++] = part0;
      cuts[nc++] = e;
      for (int p = 0; p < nc - 1; p++) begin
        entry_t en = '0;
        int a = cuts[p];
        en.src    = (a < part0) ? w0.host0 + 4*a : w0.host1 + 4*(a - part0);
        en.dst    = w0.dst + 4*a;
        en.dw_len = len_t'(cuts[p+1] - a);
        en.eochunk = (p == nc - 2) && !with_meta;
        en.eobulk  = (p == nc - 2) && !with_meta && (e == total);
        exp_e.push_back(en);
      end
      if (with_meta) begin
        entry_t en = '0;
        en.src = w1.meta_src + 4*k*int'(w1.meta_dw);
        en.dst = w1.meta_dst + 4*k*int'(w1.meta_dw);
        en.dw_len = len_t'(w1.meta_dw);
        en.is_meta = 1; en.eochunk = 1; en.eobulk = (e == total);
        exp_e.push_back(en);
      end
    end
  endtask

  int n_checked = 0;
  // Wait for the command record of channel ch and compare it.
  task automatic expect_cmd(int ch, desc_w1_t w1);
    logic [PW-1:0] w_before = wptr[ch];
    cmd_rec_t rec;
    int slot;
    while (wptr[ch] == w_before) @(posedge clk);
    slot = ch * CD + int'(w_before[PW-2:0]);
    rec = cmd_rec_t'(lm[slot]);
    chk(rec.ch == ch_t'(ch) && rec.tag == w1.tag && rec.crc_chk == w1.crc_chk &&
        rec.crc_exp == w1.crc_exp && rec.entry_addr == w1.sba_list_addr,
        $sformatf("command record fields, tag %0d", w1.tag));
    chk(int'(rec.entry_num) == exp_e.size(),
        $sformatf("tag %0d entry count %0d expected %0d", w1.tag, rec.entry_num, exp_e.size()));
    for (int i = 0; i < exp_e.size(); i++) begin
      entry_t got = entry_t'(lm[int'(w1.sba_list_addr) + i]);
      chk(got == exp_e[i], $sformatf("tag %0d entry %0d: got src %h dst %h len %0d f%b%b%b exp src %h dst %h len %0d f%b%b%b",
          w1.tag, i, got.src, got.dst, got.dw_len, got.is_meta, got.eochunk, got.eobulk,
          exp_e[i].src, exp_e[i].dst, exp_e[i].dw_len, exp_e[i].is_meta, exp_e[i].eochunk, exp_e[i].eobulk));
    end
    exp_e.delete();
    n_checked++;
  endtask

  function automatic desc_w0_t mk_w0(int h0, int h1, int dst, int total, int lba);
    desc_w0_t d = '0;
    d.host0 = h0; d.host1 = h1; d.dst = dst; d.total_dw = len_t'(total); d.lba_dw = len_t'(lba);
    return d;
  endfunction
  function automatic desc_w1_t mk_w1(int sba, int tag, bit meta, int mdw, bit link, int nxt);
    desc_w1_t d = '0;
    d.sba_list_addr = lm_addr_t'(sba); d.tag = 8'(tag); d.meta_vld = meta;
    d.meta_src = 32'h0070_0000; d.meta_dst = 32'h0080_0000; d.meta_dw = 5'(mdw);
    d.link = link; d.next_addr = lm_addr_t'(nxt); d.crc_chk = tag[0]; d.crc_exp = 16'(tag * 77);
    return d;
  endfunction

  task automatic put(int da, desc_w0_t w0, desc_w1_t w1);
    lm[da] = data_t'(w0);
    lm[da + 1] = data_t'(w1);
  endtask

  task automatic cpu_submit(int ch, int da);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req.ch = ch_t'(ch); cpu_req.desc_addr = lm_addr_t'(da);
    while (!cpu_req_ready) @(negedge clk);
    @(negedge clk);
    cpu_req_valid = 0;
  endtask

  task automatic one(int ch, int da, desc_w0_t w0, desc_w1_t w1);
    put(da, w0, w1);
    ref_entries(w0, w1);
    cpu_submit(ch, da);
    expect_cmd(ch, w1);
    rptr[ch] = wptr[ch];     // consume
  endtask

  initial begin
    cfg_en = 1; cpu_req_valid = 0; hw_req_valid = 0; cpu_req = '0; hw_req = '0;
    for (int i = 0; i < NCH; i++) rptr[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // whole LBAs in part 0
    one(0, 100, mk_w0(32'h1000, 32'h9000, 32'h20000, 48, 16), mk_w1(300, 1, 0, 0, 0, 0));
    // LBA split across the page boundary, metadata
    one(1, 102, mk_w0(32'h2000 + 4*(PAGE - 40), 32'hA000, 32'h30000, 96, 16), mk_w1(300, 2, 1, 4, 0, 0));
    // part 0 ends on an LBA boundary, metadata
    one(2, 104, mk_w0(32'h3000 + 4*(PAGE - 32), 32'hB000, 32'h40000, 64, 16), mk_w1(300, 3, 1, 8, 0, 0));
    // short last LBA inside part 0
    one(3, 106, mk_w0(32'h4000, 32'hC000, 32'h50000, 20, 16), mk_w1(300, 4, 1, 4, 0, 0));
    // linked list: descriptor at 108 links to 110
    begin
      desc_w0_t a0 = mk_w0(32'h5000, 32'hD000, 32'h60000, 32, 8);
      desc_w1_t a1 = mk_w1(300, 5, 0, 0, 1, 110);
      desc_w0_t b0 = mk_w0(32'h6000 + 4*(PAGE - 12), 32'hE000, 32'h70000, 32, 8);
      desc_w1_t b1 = mk_w1(400, 6, 1, 4, 0, 0);
      put(108, a0, a1);
      put(110, b0, b1);
      ref_entries(a0, a1);
      cpu_submit(4, 108);
      expect_cmd(4, a1);
      ref_entries(b0, b1);
      expect_cmd(4, b1);
      rptr[4] = wptr[4];
    end
    // hardware port
    begin
      desc_w0_t h0 = mk_w0(32'h7000, 32'hF000, 32'h90000, 16, 16);
      desc_w1_t h1 = mk_w1(300, 7, 0, 0, 0, 0);
      put(112, h0, h1);
      ref_entries(h0, h1);
      @(negedge clk);
      hw_req_valid = 1; hw_req.ch = 3'd5; hw_req.desc_addr = 16'd112;
      while (!hw_req_ready) @(negedge clk);
      @(negedge clk);
      hw_req_valid = 0;
      expect_cmd(5, h1);
      rptr[5] = wptr[5];
    end
    // full ring: channel 7 has two slots; a third command waits for rptr
    begin
      desc_w0_t f0 = mk_w0(32'h8000, 32'h0, 32'hA0000, 16, 16);
      for (int k = 0; k < 3; k++) put(120 + 2*k, f0, mk_w1(500 + 4*k, 20 + k, 0, 0, 0, 0));
      for (int k = 0; k < 3; k++) cpu_submit(7, 120 + 2*k);
      repeat (200) @(posedge clk);
      chk(wptr[7] == PW'(2) && busy, "third command blocked by full ring");
      rptr[7] = 1;
      repeat (100) @(posedge clk);
      chk(wptr[7] == PW'(3) && !busy, "third command queued after rptr moved");
      begin
        cmd_rec_t r3;
        r3 = cmd_rec_t'(lm[7*CD + 0]);
        chk(r3.tag == 8'd22, "third record reuses slot 0");
      end
      rptr[7] = wptr[7];
    end
    // disabled: a request waits in the FIFO
    begin
      desc_w0_t d0 = mk_w0(32'h9000, 32'h0, 32'hB0000, 16, 8);
      desc_w1_t d1 = mk_w1(300, 30, 0, 0, 0, 0);
      cfg_en = 0;
      put(130, d0, d1);
      ref_entries(d0, d1);
      cpu_submit(6, 130);
      repeat (50) @(posedge clk);
      chk(wptr[6] == 0, "nothing done while disabled");
      cfg_en = 1;
      expect_cmd(6, d1);
      rptr[6] = wptr[6];
    end
    // random descriptors
    for (int n = 0; n < 60; n++) begin
      automatic int lba = 4 << ($urandom % 4);
      automatic int nl = 1 + $urandom % 6;
      automatic int off = 4 * ($urandom % (PAGE / 4));
      automatic int ch = $urandom % 7;
      automatic bit meta = $urandom % 2;
      one(ch, 140 + 2*(n % 20), mk_w0(32'h10000 + 4*off, 32'h20000 + 64*n, 32'h40000 + 1024*n, lba*nl, lba),
          mk_w1(600, 40 + n, meta, 4 * (1 + $urandom % 3), 0, 0));
    end
    chk(n_checked == 68, "all commands checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
