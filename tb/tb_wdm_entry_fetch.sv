// tb_wdm_entry_fetch: the write side's command buffer and entry fetch.
// The testbench plays local memory (entry lists, random grant delays) and
// takes the write parameters with random backpressure. For 200 random commands
// of 1..6 entries it checks one parameter record per entry, in order, with the
// entry's destination, length and flags and the command's channel and tag, and
// that every local-memory read lies inside the command's entry list.
`timescale 1ns/1ps
module tb_wdm_entry_fetch;
  import dma_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic cmd_valid, cmd_ready, lm_req, lm_gnt, lm_rvalid, wp_valid, wp_ready;
  cmd_rec_t cmd;
  lm_addr_t lm_addr;
  data_t lm_rdata;
  wparam_t wp;
  int checks = 0, failures = 0;

  wdm_entry_fetch dut (.*);

  initial begin
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

  data_t lm [1024];
  logic gnt_en;
  assign lm_gnt = lm_req && gnt_en;
  always @(posedge clk) begin
    gnt_en   <= $urandom % 2;
    wp_ready <= $urandom % 3 != 0;
    lm_rvalid <= 0;
    if (lm_req && lm_gnt) begin lm_rdata <= lm[lm_addr]; lm_rvalid <= 1; end
  end

  wparam_t exp_wp [$];
  int n_wp = 0;

  always @(posedge clk) if (rst_n) begin
    if (wp_valid && wp_ready) begin
      wparam_t e;
      e = exp_wp.pop_front();
      chk(wp == e, $sformatf("write parameters %0d", n_wp));
      n_wp++;
    end
    if (lm_req && lm_gnt)
      chk(lm_addr >= dut.cq.entry_addr && lm_addr < dut.cq.entry_addr + lm_addr_t'(dut.cq.entry_num),
          "entry read inside the entry list");
  end

  initial begin
    int ea;
    ea = 0;
    cmd_valid = 0; cmd = '0; wp_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      automatic int ne = 1 + $urandom % 6;
      automatic cmd_rec_t rec = '0;
      rec.ch = ch_t'($urandom); rec.tag = 8'(c);
      rec.entry_addr = lm_addr_t'(ea); rec.entry_num = len_t'(ne);
      for (int k = 0; k < ne; k++) begin
        automatic entry_t e = '0;
        automatic wparam_t p;
        e.src = 32'($urandom) & ~32'hF;
        e.dst = 32'($urandom) & ~32'hF;
        e.dw_len = len_t'(4 * (1 + $urandom % 64));
        e.eochunk = $urandom % 2;
        e.eobulk = (k == ne - 1);
        e.is_meta = $urandom % 2;
        lm[ea + k] = data_t'(e);
        p.dst = e.dst; p.dw_len = e.dw_len; p.eochunk = e.eochunk; p.eobulk = e.eobulk;
        p.ch = rec.ch; p.tag = rec.tag;
        exp_wp.push_back(p);
      end
      ea = (ea + ne) % 1000;
      @(negedge clk);
      cmd_valid = 1; cmd = rec;
      while (!cmd_ready) @(negedge clk);
      @(negedge clk);
      cmd_valid = 0;
    end
    while (exp_wp.size() > 0) @(posedge clk);
    chk(n_wp > 200, "every entry produced parameters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
