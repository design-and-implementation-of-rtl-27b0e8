// tb_read_data_mover: entry fetch and bulk reads against a memory model.
// The testbench plays local memory (entry lists, random grant delays) and an
// AXI slave memory with random stalls, and takes the data output with random
// backpressure; words 5000..5003 of the memory answer reads with SLVERR. For
// 80 random commands of 1..5 entries (lengths 4..256 dwords, some crossing
// 4 KiB) it checks: every data beat equals the source memory word; "last" on
// each entry's final beat and "eobulk" only on the command's final beat, with
// the command's CRC fields; the read-error flag on exactly the beats read from
// the SLVERR words; every read burst is at most 16 beats and stays inside a
// 4 KiB page.
`timescale 1ns/1ps
module tb_read_data_mover;
  import dma_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic cmd_valid, cmd_ready, lm_req, lm_gnt, lm_rvalid;
  cmd_rec_t cmd;
  lm_addr_t lm_addr;
  data_t lm_rdata;
  logic arvalid, arready, rvalid, rready, out_valid, out_ready;
  axi_ax_t ar;
  axi_r_t r;
  rbeat_t out_beat;
  int checks = 0, failures = 0;

  read_data_mover #(.BUF_DEPTH(16)) dut (.*);

  logic awvalid = 0, wvalid = 0, bready = 0, awready, wready, bvalid;
  axi_ax_t aw = '0;
  axi_w_t w = '0;
  axi_b_t b;
  axi_mem_model #(.WORDS(16384)) u_mem (
    .clk, .rst_n, .stall(1'b0), .rnd_ready(1'b1), .err_lo(5000), .err_hi(5003),
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

  data_t lm [1024];
  logic gnt_en;
  assign lm_gnt = lm_req && gnt_en;
  always @(posedge clk) begin
    gnt_en <= $urandom % 2;
    out_ready <= $urandom % 4 != 0;
    lm_rvalid <= 0;
    if (lm_req && lm_gnt) begin lm_rdata <= lm[lm_addr]; lm_rvalid <= 1; end
  end

  rbeat_t  exp_b [$];
  int n_rerr = 0, n_b = 0, n_4k = 0;

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      rbeat_t e;
      e = exp_b.pop_front();
      chk(out_beat == e, $sformatf("beat %0d", n_b));
      n_b++;
    end
    if (arvalid && arready) begin
      chk(ar.len < 16 && (int'(ar.addr[11:0]) + 16*(int'(ar.len) + 1)) <= 4096 && ar.burst == 2'b01 &&
          ar.size == 3'd4, "burst within 16 beats and one 4 KiB page");
      if ((int'(ar.addr[11:0]) + 16*(int'(ar.len) + 1)) == 4096 && ar.len != 15) n_4k++;
    end
  end

  initial begin
    int ea = 0;
    cmd_valid = 0; cmd = '0;
    for (int i = 0; i < 16384; i++) u_mem.mem[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 80; c++) begin
      automatic int ne = 1 + $urandom % 5;
      automatic cmd_rec_t rec = '0;
      rec.ch = ch_t'($urandom); rec.tag = 8'(c); rec.crc_chk = $urandom % 2; rec.crc_exp = 16'($urandom);
      rec.entry_addr = lm_addr_t'(ea); rec.entry_num = len_t'(ne);
      for (int k = 0; k < ne; k++) begin
        automatic entry_t e = '0;
        automatic int beats = 1 + $urandom % 64;
        e.src = (c == 7 && k == 0) ? 32'(16 * 4990) : 32'(16 * ($urandom % (16384 - 64)));
        e.dst = 32'($urandom) & ~32'hF;
        e.dw_len = len_t'(4 * beats);
        e.eochunk = $urandom % 2;
        e.eobulk = (k == ne - 1);
        e.is_meta = $urandom % 2;
        lm[(ea + k) % 1024] = data_t'(e);
        for (int bt = 0; bt < beats; bt++) begin
          automatic rbeat_t rb;
          rb.data = u_mem.mem[int'(e.src >> 4) + bt];
          rb.last = (bt == beats - 1);
          rb.eobulk = rb.last && e.eobulk;
          rb.crc_chk = rec.crc_chk;
          rb.crc_exp = rec.crc_exp;
          rb.rerr = (int'(e.src >> 4) + bt >= 5000 && int'(e.src >> 4) + bt <= 5003);
          if (rb.rerr) n_rerr++;
          exp_b.push_back(rb);
        end
      end
      ea = (ea + ne) % 1000;
      @(negedge clk);
      cmd_valid = 1; cmd = rec;
      while (!cmd_ready) @(negedge clk);
      @(negedge clk);
      cmd_valid = 0;
    end
    while (exp_b.size() > 0) @(posedge clk);
    chk(n_4k > 0, "a burst was cut at a 4 KiB boundary");
    chk(n_rerr > 0, "a read came back with SLVERR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
