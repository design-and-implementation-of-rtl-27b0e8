// tb_cmd_parser: command fetch with fixed-priority channel choice.
// The testbench models local memory (random grant delays) and the monitor's
// per-channel pending counts and read pointers. Phase 1 queues commands on
// several channels at once and checks that they come out channel by channel,
// lowest channel first. Phase 2 adds commands at random. Every command must
// be the record stored at ring slot channel*CH_DEPTH + read pointer, and
// fsm_start must name its channel. Nothing may be fetched while disabled.
`timescale 1ns/1ps
module tb_cmd_parser;
  import dma_pkg::*;
  localparam int CD = 4, PW = 3;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic cfg_en, fsm_start, lm_req, lm_gnt, lm_rvalid, cmd_valid, cmd_ready;
  logic [NCH-1:0] bmp;
  logic [PW-1:0] rptr [NCH];
  ch_t fsm_ch;
  lm_addr_t lm_addr;
  data_t lm_rdata;
  cmd_rec_t cmd;
  int checks = 0, failures = 0;

  cmd_parser #(.CH_DEPTH(CD)) dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  data_t lm [NCH*CD];
  logic gnt_en;
  int   pend [NCH];
  int   got = 0, added = 0;
  int   order [$];
  assign lm_gnt = lm_req && gnt_en;
  always_comb for (int i = 0; i < NCH; i++) bmp[i] = pend[i] > 0;

  always @(posedge clk) begin
    gnt_en <= ($urandom % 2);
    cmd_ready <= ($urandom % 3) != 0;
    lm_rvalid <= 0;
    if (lm_req && lm_gnt) begin lm_rdata <= lm[lm_addr]; lm_rvalid <= 1; end
    if (rst_n && cmd_valid && cmd_ready) begin
      int c;
      c = int'(cmd.ch);
      chk(fsm_start && fsm_ch == cmd.ch, "fsm_start with the command's channel");
      chk(pend[c] > 0, "command from a pending channel");
      chk(cmd == cmd_rec_t'(lm[c*CD + int'(rptr[c][PW-2:0])]), "command record content");
      pend[c]--;
      rptr[c] = rptr[c] + 1'b1;
      order.push_back(c);
      got++;
    end
  end

  task automatic add(int c);
    cmd_rec_t r = '0;
    int slot;
    slot = c*CD + int'((rptr[c] + PW'(pend[c])) % CD);
    r.ch = ch_t'(c); r.tag = 8'($urandom); r.entry_addr = lm_addr_t'($urandom);
    r.entry_num = len_t'(1 + $urandom % 9); r.crc_exp = 16'($urandom);
    lm[slot] = data_t'(r);
    pend[c]++;
    added++;
  endtask

  initial begin
    cfg_en = 0;
    for (int i = 0; i < NCH; i++) begin pend[i] = 0; rptr[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    add(6); add(6); add(2); add(5); add(2); add(0); add(7);
    repeat (30) @(posedge clk);
    chk(got == 0, "no fetch while disabled");
    cfg_en = 1;
    while (got < 7) @(posedge clk);
    chk(order.size() == 7 && order[0] == 0 && order[1] == 2 && order[2] == 2 && order[3] == 5 &&
        order[4] == 6 && order[5] == 6 && order[6] == 7, "priority order 0,2,2,5,6,6,7");
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      begin
        automatic int c = $urandom % NCH;
        if (pend[c] < CD) add(c);
      end
      repeat ($urandom % 4) @(negedge clk);
    end
    while (got < added) @(posedge clk);
    chk(added > 150, "enough commands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
