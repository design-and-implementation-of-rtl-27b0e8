// tb_dma_top: end-to-end test of the whole controller at its default sizes.
//
// Two AXI memory models stand in for the DDR of each option. Through the CPU
// register port the test writes descriptors into local memory, submits them
// (and one through the hardware-device port), and then checks every
// completion record (tag, channel, CRC, CRC error, response error, LBA chunk
// count) and every destination word against a reference model written here
// independently of the RTL: it walks the two host parts and the LBAs itself
// and computes CRC16-CCITT bit by bit.
// Mechanisms exercised and counted: whole-LBA cuts, partial cuts at the page
// boundary, the rest of a split LBA from host1, part-1 start on an LBA
// boundary, metadata entries, linked descriptors, a full channel ring, channel
// arbitration with several channels pending, bursts cut at 4 KiB, chunk ends,
// CRC mismatch, write- and read-response errors, hardware request, disabling the engine
// mid-split, and bus stalls.
`timescale 1ns/1ps
module tb_dma_top;
  import dma_pkg::*;

  localparam int PAGE = 1024;   // default PAGE_DW
  localparam int WORDS = 262144;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        cpu_wr;
  logic [7:0]  cpu_addr;
  logic [31:0] cpu_wdata, cpu_rdata;
  logic [1:0]  irq, hw_req_valid, hw_req_ready;
  dma_req_t [1:0] hw_req;
  logic [1:0] arvalid, arready, rvalid, rready, awvalid, awready, wvalid, wready, bvalid, bready;
  axi_ax_t [1:0] ar, aw;
  axi_r_t  [1:0] r;
  axi_w_t  [1:0] w;
  axi_b_t  [1:0] b;
  logic stall, rnd;
  int   err_lo, err_hi;

  dma_top dut (.*);

  axi_mem_model #(.WORDS(WORDS)) u_ddr0 (
    .clk, .rst_n, .stall, .rnd_ready(rnd), .err_lo, .err_hi,
    .arvalid(arvalid[0]), .arready(arready[0]), .ar(ar[0]), .rvalid(rvalid[0]), .rready(rready[0]), .r(r[0]),
    .awvalid(awvalid[0]), .awready(awready[0]), .aw(aw[0]), .wvalid(wvalid[0]), .wready(wready[0]), .w(w[0]),
    .bvalid(bvalid[0]), .bready(bready[0]), .b(b[0]));
  axi_mem_model #(.WORDS(WORDS)) u_ddr1 (
    .clk, .rst_n, .stall, .rnd_ready(rnd), .err_lo(-1), .err_hi(-1),
    .arvalid(arvalid[1]), .arready(arready[1]), .ar(ar[1]), .rvalid(rvalid[1]), .rready(rready[1]), .r(r[1]),
    .awvalid(awvalid[1]), .awready(awready[1]), .aw(aw[1]), .wvalid(wvalid[1]), .wready(wready[1]), .w(w[1]),
    .bvalid(bvalid[1]), .bready(bready[1]), .b(b[1]));

  int checks = 0, failures = 0;
  int cycle = 0;
  int ncpl = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d completions", ncpl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model --------------------------------------
  data_t exp_mem [2][WORDS];
  bit    touched [2][WORDS];

  typedef struct {
    bit          used;
    bit          seen;
    int          opt;
    int          ch;
    logic [15:0] crc;
    bit          crc_err;
    bit          resp_err;
    int          chunks;
  } exp_cpl_t;
  exp_cpl_t exp_cpl [256];

  function automatic logic [15:0] ref_crc(logic [15:0] c, data_t d);
    for (int by = 0; by < 16; by++)
      for (int bit_i = 7; bit_i >= 0; bit_i--) begin
        logic x = c[15] ^ d[by*8 + bit_i];
        c = c << 1;
        if (x) c = c ^ 16'h1021;
      end
    return c;
  endfunction

  function automatic data_t src_word(int opt, int a);
    return opt == 0 ? u_ddr0.mem[(a >> 4) % WORDS] : u_ddr1.mem[(a >> 4) % WORDS];
  endfunction

  // Expected effect of one descriptor; returns the CRC of the moved stream.
  task automatic model_desc(int opt, desc_w0_t w0, desc_w1_t w1, int ch, bit resp_err);
    int part0, total, lba, nl;
    logic [15:0] c = 16'hFFFF;
    total = int'(w0.total_dw);
    lba   = int'(w0.lba_dw);
    part0 = PAGE - ((int'(w0.host0) >> 2) % PAGE);
    if (part0 > total) part0 = total;
    nl = (total + lba - 1) / lba;
    for (int k = 0; k < nl; k++) begin
      int len = (total - k*lba < lba) ? total - k*lba : lba;
      for (int d = 0; d < len; d += 4) begin
        int dw = k*lba + d;
        int sa = (dw < part0) ? int'(w0.host0) + 4*dw : int'(w0.host1) + 4*(dw - part0);
        int da = int'(w0.dst) + 4*dw;
        data_t v = src_word(opt, sa);
        exp_mem[opt][da >> 4] = v;
        touched[opt][da >> 4] = 1;
        c = ref_crc(c, v);
      end
      if (w1.meta_vld && (len == lba)) begin
        for (int d = 0; d < int'(w1.meta_dw); d += 4) begin
          int sa = int'(w1.meta_src) + 4*(k*int'(w1.meta_dw) + d);
          int da = int'(w1.meta_dst) + 4*(k*int'(w1.meta_dw) + d);
          data_t v = src_word(opt, sa);
          exp_mem[opt][da >> 4] = v;
          touched[opt][da >> 4] = 1;
          c = ref_crc(c, v);
        end
      end
    end
    exp_cpl[w1.tag].used     = 1;
    exp_cpl[w1.tag].opt      = opt;
    exp_cpl[w1.tag].ch       = ch;
    exp_cpl[w1.tag].crc      = c;
    exp_cpl[w1.tag].crc_err  = w1.crc_chk && (w1.crc_exp != c);
    exp_cpl[w1.tag].resp_err = resp_err;
    exp_cpl[w1.tag].chunks   = nl;
  endtask

  // ---------------- CPU register access ------------------------------------
  task automatic reg_wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    cpu_wr = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge clk);
    cpu_wr = 0;
  endtask

  task automatic reg_rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    cpu_addr = a;
    #0.1 d = cpu_rdata;
  endtask

  task automatic lm_write(int opt, int a, data_t v);
    logic [31:0] s;
    reg_wr(8'h04, {opt[0], 15'd0, a[15:0]});
    for (int i = 0; i < 4; i++) reg_wr(8'h08 + 8'(4*i), v[32*i +: 32]);
    reg_wr(8'h18, 0);
    do reg_rd(8'h18, s); while (s[0]);
  endtask

  task automatic submit(int opt, int ch, int da);
    logic [31:0] s;
    do reg_rd(8'h1C, s); while (s[0]);
    reg_wr(8'h1C, {opt[0], 12'd0, ch[2:0], da[15:0]});
  endtask

  task automatic put_desc(int opt, int da, desc_w0_t w0, desc_w1_t w1);
    lm_write(opt, da, data_t'(w0));
    lm_write(opt, da + 1, data_t'(w1));
  endtask

  function automatic desc_w0_t mk_w0(int h0, int h1, int dst, int total, int lba);
    desc_w0_t d = '0;
    d.host0 = h0; d.host1 = h1; d.dst = dst; d.total_dw = total[15:0]; d.lba_dw = lba[15:0];
    return d;
  endfunction

  function automatic desc_w1_t mk_w1(int sba, int tag, bit meta, int msrc, int mdst, int mdw,
                                     bit link, int nxt, bit chk, logic [15:0] cexp);
    desc_w1_t d = '0;
    d.sba_list_addr = sba[15:0]; d.tag = tag[7:0]; d.meta_vld = meta; d.meta_src = msrc;
    d.meta_dst = mdst; d.meta_dw = mdw[4:0]; d.link = link; d.next_addr = nxt[15:0];
    d.crc_chk = chk; d.crc_exp = cexp;
    return d;
  endfunction

  // Describe, model and submit one descriptor.
  task automatic run_desc(int opt, int ch, int da, desc_w0_t w0, desc_w1_t w1, bit resp_err = 0);
    put_desc(opt, da, w0, w1);
    model_desc(opt, w0, w1, ch, resp_err);
    submit(opt, ch, da);
  endtask

  // ---------------- completions -------------------------------------------
  task automatic drain(int want);
    logic [31:0] lo, hi;
    while (ncpl < want) begin
      @(negedge clk);
      for (int o = 0; o < 2; o++) begin
        if (irq[o]) begin
          reg_rd(o ? 8'h28 : 8'h20, lo);
          reg_rd(o ? 8'h2C : 8'h24, hi);
          reg_wr(o ? 8'h28 : 8'h20, 0);
          ncpl++;
          begin
            int t = int'(lo[15:8]);
            check(exp_cpl[t].used && !exp_cpl[t].seen, $sformatf("unexpected completion tag %0d", t));
            exp_cpl[t].seen = 1;
            check(exp_cpl[t].opt == o, $sformatf("tag %0d option", t));
            check(int'(lo[7:5]) == exp_cpl[t].ch, $sformatf("tag %0d channel %0d", t, lo[7:5]));
            check(lo[31:16] == exp_cpl[t].crc,
                  $sformatf("tag %0d crc %h exp %h", t, lo[31:16], exp_cpl[t].crc));
            check(lo[2] == exp_cpl[t].crc_err, $sformatf("tag %0d crc_err", t));
            check(lo[1] == exp_cpl[t].resp_err, $sformatf("tag %0d resp_err", t));
            check(int'(hi[15:0]) == exp_cpl[t].chunks,
                  $sformatf("tag %0d chunks %0d exp %0d", t, hi[15:0], exp_cpl[t].chunks));
          end
        end
      end
    end
  endtask

  // ---------------- mechanism counters --------------------------------------
  int n_cut0 = 0, n_partial = 0, n_cut1 = 0, n_p1init = 0, n_meta = 0, n_link = 0;
  int n_ringfull = 0, n_arb = 0, n_4k = 0, n_chunkend = 0, n_crcerr = 0, n_resperr = 0, n_rderr = 0;
  int n_hw = 0, n_abort = 0, n_stall = 0, n_cut2 = 0;
  string ps0 = "", ps1 = "";

  always @(posedge clk) if (rst_n) begin
    string s0, s1;
    s0 = dut.g_opt[0].u_eng.u_split.state.name();
    s1 = dut.g_opt[1].u_eng.u_split.state.name();
    if (s0 == "CUT0_SGL" || s1 == "CUT0_SGL") n_cut0++;
    if (s0 == "CUT0_SGL_1" || s1 == "CUT0_SGL_1") n_partial++;
    if (s0 == "CUT1_SGL_0" || s1 == "CUT1_SGL_0") n_cut1++;
    if (s0 == "CUT2_SGL_INIT" || s1 == "CUT2_SGL_INIT") n_p1init++;
    if (s0 == "CUT2_SGL" || s1 == "CUT2_SGL") n_cut2++;
    if (s0 == "CUT0_META" || s0 == "CUT0_META_1" || s0 == "CUT2_META" ||
        s1 == "CUT0_META" || s1 == "CUT0_META_1" || s1 == "CUT2_META") n_meta++;
    if ((ps0 == "SGL_CUTTING_OVER" && s0 == "ENTRY_ADDR_GET") ||
        (ps1 == "SGL_CUTTING_OVER" && s1 == "ENTRY_ADDR_GET")) n_link++;
    if ((ps0 != "CUT_IDEAL" && ps0 != "" && s0 == "CUT_IDEAL" && !dut.cfg_en[0]) ||
        (ps1 != "CUT_IDEAL" && ps1 != "" && s1 == "CUT_IDEAL" && !dut.cfg_en[1])) n_abort++;
    if ((s0 == "SGL_CUTTING_OVER" && dut.g_opt[0].u_eng.u_split.ring_full) ||
        (s1 == "SGL_CUTTING_OVER" && dut.g_opt[1].u_eng.u_split.ring_full)) n_ringfull++;
    ps0 = s0; ps1 = s1;
    for (int o = 0; o < 2; o++) begin
      if (o == 0 && dut.g_opt[0].u_eng.u_cp.state.name() == "P_IDLE" && dut.cfg_en[0] &&
          $countones(dut.bmp[0]) > 1) n_arb++;
      if (o == 1 && dut.g_opt[1].u_eng.u_cp.state.name() == "P_IDLE" && dut.cfg_en[1] &&
          $countones(dut.bmp[1]) > 1) n_arb++;
      if (o == 0 && dut.g_opt[0].u_eng.u_wdm.state.name() == "C_EGRESS_CHUNKEND") n_chunkend++;
      if (o == 1 && dut.g_opt[1].u_eng.u_wdm.state.name() == "C_EGRESS_CHUNKEND") n_chunkend++;
      if (awvalid[o] && awready[o] && aw[o].len < 8'(MAX_BURST - 1) &&
          ((aw[o].addr[11:0] + {aw[o].len, 4'b0} + 12'h10) == 12'h000)) n_4k++;
      if ((arvalid[o] && !arready[o]) || (awvalid[o] && !awready[o]) || (wvalid[o] && !wready[o]))
        n_stall++;
      if (hw_req_valid[o] && hw_req_ready[o]) n_hw++;
    end
  end

  // ---------------- stimulus ---------------------------------------------
  logic [31:0] rd;

  initial begin
    cpu_wr = 0; cpu_addr = 0; cpu_wdata = 0;
    hw_req_valid = '0; hw_req = '0;
    stall = 0; rnd = 1; err_lo = 61440; err_hi = 61443;
    for (int o = 0; o < 2; o++)
      for (int i = 0; i < WORDS; i++) touched[o][i] = 0;
    for (int t = 0; t < 256; t++) exp_cpl[t] = '{default: 0};
    for (int i = 0; i < WORDS; i++) begin
      u_ddr0.mem[i] = {$urandom, $urandom, $urandom, $urandom};
      u_ddr1.mem[i] = {$urandom, $urandom, $urandom, $urandom};
    end
    for (int i = 0; i < WORDS; i++) begin
      exp_mem[0][i] = u_ddr0.mem[i];
      exp_mem[1][i] = u_ddr1.mem[i];
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    reg_wr(8'h00, 32'h3);
    reg_rd(8'h00, rd);
    check(rd[1:0] == 2'b11, "CTRL readback");

    // 1. option 0, channel 3: four whole LBAs inside part 0, CRC checked OK
    begin
      desc_w0_t w0 = mk_w0(32'h0000_0000, 32'h0, 32'h0008_0000, 64, 16);
      desc_w1_t w1 = mk_w1(200, 1, 0, 0, 0, 0, 0, 0, 0, 16'h0);
      model_desc(0, w0, w1, 3, 0);
      w1.crc_chk = 1; w1.crc_exp = exp_cpl[1].crc;
      run_desc(0, 3, 128, w0, w1);
    end
    // 2. option 0, channel 1: part 0 ends inside an LBA, metadata on
    run_desc(0, 1, 130,
             mk_w0(32'h0000_1000 + 4*(PAGE - 40), 32'h0001_0000, 32'h0009_0000, 96, 16),
             mk_w1(260, 2, 1, 32'h0002_0000, 32'h000A_0000, 4, 0, 0, 0, 0));
    // 3. option 1, channel 5: part 0 ends on an LBA boundary; linked to a second
    //    descriptor (tag 4) with a wrong expected CRC
    put_desc(1, 140, mk_w0(32'h0003_0000, 32'h0003_8000, 32'h0004_0F00, 512, 128),
             mk_w1(320, 4, 0, 0, 0, 0, 0, 0, 1, 16'h1234));
    model_desc(1, mk_w0(32'h0003_0000, 32'h0003_8000, 32'h0004_0F00, 512, 128),
               mk_w1(320, 4, 0, 0, 0, 0, 0, 0, 1, 16'h1234), 5, 0);
    run_desc(1, 5, 138,
             mk_w0(32'h0005_0000 + 4*(PAGE - 32), 32'h0006_0000, 32'h0007_0000, 64, 16),
             mk_w1(300, 3, 1, 32'h0002_8000, 32'h000B_0000, 8, 1, 140, 0, 0));
    // 4. write response error (destination words 61440..61443 answer SLVERR)
    run_desc(0, 0, 142, mk_w0(32'h000C_0000, 32'h0, 32'h000F_0000 - 32, 32, 8),
             mk_w1(340, 5, 0, 0, 0, 0, 0, 0, 0, 0), 1);
    drain(5);

    // 4b. read response error (source words 61440..61443 answer SLVERR)
    run_desc(0, 3, 146, mk_w0(32'h000F_0000, 32'h0, 32'h000C_8000, 16, 16),
             mk_w1(350, 7, 0, 0, 0, 0, 0, 0, 0, 0), 1);
    drain(6);

    // 5. hardware-device request, option 1, channel 2
    begin
      desc_w0_t w0 = mk_w0(32'h000D_0000, 32'h0, 32'h000E_0000, 32, 32);
      desc_w1_t w1 = mk_w1(360, 6, 0, 0, 0, 0, 0, 0, 0, 0);
      put_desc(1, 144, w0, w1);
      model_desc(1, w0, w1, 2, 0);
      @(negedge clk);
      hw_req_valid[1] = 1; hw_req[1].ch = 3'd2; hw_req[1].desc_addr = 16'd144;
      do @(negedge clk); while (!hw_req_ready[1]);
      hw_req_valid[1] = 0;
      drain(7);
    end

    // 6. many channels pending at once: two long transfers on each channel
    stall = 1;
    fork begin repeat (1200) @(posedge clk); stall = 0; end join_none
    for (int c = 7; c >= 0; c--) begin
      run_desc(0, c, 150 + 2*c, mk_w0(32'h0010_0000 + c*32'h2000, 32'h0, 32'h0020_0000 + c*32'h2000, 512, 256),
               mk_w1(400 + 4*c, 16 + c, 0, 0, 0, 0, 0, 0, 0, 0));
      run_desc(0, c, 170 + 2*c, mk_w0(32'h0014_0000 + c*32'h2000, 32'h0, 32'h0024_0000 + c*32'h2000, 512, 256),
               mk_w1(440 + 4*c, 88 + c, 0, 0, 0, 0, 0, 0, 0, 0));
    end
    drain(23);

    // 7. fill one channel ring: 40 small commands on option 1 channel 6
    stall = 1;
    fork begin repeat (2500) @(posedge clk); stall = 0; end join_none
    for (int k = 0; k < 40; k++)
      run_desc(1, 6, 500 + 2*k, mk_w0(32'h0030_0000 + k*64, 32'h0, 32'h0038_0000 + k*64, 16, 16),
               mk_w1(600 + k, 32 + k, 0, 0, 0, 0, 0, 0, 0, 0));
    drain(63);

    // 8. disable option 0 in the middle of a split, then redo the request
    begin
      desc_w0_t w0 = mk_w0(32'h0034_0000, 32'h0, 32'h003C_0000, 256, 4);
      desc_w1_t w1 = mk_w1(700, 80, 0, 0, 0, 0, 0, 0, 0, 0);
      put_desc(0, 690, w0, w1);
      submit(0, 4, 690);
      repeat (60) @(posedge clk);
      reg_wr(8'h00, 32'h2);
      repeat (4) @(posedge clk);
      check(dut.g_opt[0].u_eng.u_split.state.name() == "CUT_IDEAL", "disable returns splitter to idle");
      reg_wr(8'h00, 32'h3);
      model_desc(0, w0, w1, 4, 0);
      submit(0, 4, 690);
      drain(64);
    end

    repeat (50) @(posedge clk);
    reg_rd(8'h30, rd);
    check(rd[17:0] == '0, "all channels idle at the end");
    check(irq == 2'b00, "no completion left");

    // destination memory compare
    for (int o = 0; o < 2; o++)
      for (int i = 0; i < WORDS; i++)
        if (touched[o][i])
          check((o == 0 ? u_ddr0.mem[i] : u_ddr1.mem[i]) == exp_mem[o][i],
                $sformatf("option %0d word %0d", o, i));
    for (int t = 0; t < 256; t++)
      if (exp_cpl[t].used) check(exp_cpl[t].seen, $sformatf("completion of tag %0d missing", t));
    n_crcerr  = exp_cpl[4].crc_err;
    n_resperr = exp_cpl[5].resp_err;
    n_rderr   = exp_cpl[7].resp_err;

    $display("mechanisms: cut0=%0d partial=%0d cut1=%0d part1_init=%0d cut2=%0d meta=%0d link=%0d ringfull=%0d",
             n_cut0, n_partial, n_cut1, n_p1init, n_cut2, n_meta, n_link, n_ringfull);
    $display("            arbitration=%0d burst_4k=%0d chunkend=%0d crc_err=%0d resp_err=%0d read_err=%0d hw=%0d abort=%0d stall=%0d",
             n_arb, n_4k, n_chunkend, n_crcerr, n_resperr, n_rderr, n_hw, n_abort, n_stall);
    check(n_cut0 > 0, "whole-LBA cut never happened");
    check(n_partial > 0, "partial cut never happened");
    check(n_cut1 > 0, "rest-of-LBA cut never happened");
    check(n_p1init > 0, "part-1 start never happened");
    check(n_cut2 > 0, "part-1 cut never happened");
    check(n_meta > 0, "metadata entry never happened");
    check(n_link > 0, "linked descriptor never happened");
    check(n_ringfull > 0, "full ring never happened");
    check(n_arb > 0, "arbitration between channels never happened");
    check(n_4k > 0, "4 KiB burst split never happened");
    check(n_chunkend > 0, "chunk end never happened");
    check(n_crcerr > 0, "CRC mismatch never happened");
    check(n_resperr > 0, "response error never happened");
    check(n_rderr > 0, "read response error never happened");
    check(n_hw > 0, "hardware request never happened");
    check(n_abort > 0, "disable during split never happened");
    check(n_stall > 0, "bus stall never happened");
    $display("cycles=%0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
