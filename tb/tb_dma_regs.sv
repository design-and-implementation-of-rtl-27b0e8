// tb_dma_regs: CPU register block.
// Checks the enable and data registers by read-back, the local-memory write
// window (request held on the selected option until granted, word and address
// as written), request submission (channel, descriptor address and option,
// held until accepted, busy bit), completion read-out and pop for both
// options, and the status register.
`timescale 1ns/1ps
module tb_dma_regs;
  import dma_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic cpu_wr;
  logic [7:0] cpu_addr;
  logic [31:0] cpu_wdata, cpu_rdata;
  logic [1:0] cfg_en, lm_req, lm_gnt, sub_valid, sub_ready, cpl_valid, cpl_pop, split_busy;
  lm_addr_t lm_addr;
  data_t lm_wdata;
  dma_req_t sub_req;
  cpl_t [1:0] cpl;
  logic [1:0][NCH-1:0] bmp;
  int checks = 0, failures = 0;

  dma_regs dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); cpu_wr = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge clk); cpu_wr = 0;
  endtask
  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); cpu_addr = a; #0.1 d = cpu_rdata;
  endtask

  logic [31:0] v;
  initial begin
    cpu_wr = 0; cpu_addr = 0; cpu_wdata = 0; lm_gnt = 0; sub_ready = 0;
    cpl_valid = 0; cpl = '0; bmp = '0; split_busy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    chk(cfg_en == 0 && lm_req == 0 && sub_valid == 0, "reset values");
    wr(8'h00, 32'h2); chk(cfg_en == 2'b10, "CTRL enable option 1");
    rd(8'h00, v);     chk(v == 32'h2, "CTRL read-back");
    wr(8'h00, 32'h3);
    for (int i = 0; i < 4; i++) wr(8'h08 + 8'(4*i), 32'hA000_0000 + i);
    wr(8'h04, 32'h8000_0123);
    chk(lm_wdata == {32'hA000_0003, 32'hA000_0002, 32'hA000_0001, 32'hA000_0000}, "LM word");
    rd(8'h04, v); chk(v == 32'h8000_0123, "LM_ADDR read-back");
    wr(8'h18, 0);
    chk(lm_req == 2'b10 && lm_addr == 16'h0123, "LM write request on option 1");
    repeat (3) @(negedge clk);
    rd(8'h18, v); chk(v[0] && lm_req == 2'b10, "LM request held until granted");
    @(negedge clk); lm_gnt = 2'b10; @(negedge clk); lm_gnt = 0;
    chk(lm_req == 0, "LM request dropped after grant");
    wr(8'h1C, 32'h0005_0040);   // option 0, channel 5, descriptor 0x40
    chk(sub_valid == 2'b01 && sub_req.ch == 3'd5 && sub_req.desc_addr == 16'h40, "submit option 0");
    wr(8'h1C, 32'h8002_0077);   // ignored while busy
    chk(sub_req.ch == 3'd5 && sub_req.desc_addr == 16'h40, "second submit ignored while busy");
    rd(8'h1C, v); chk(v[0], "submit busy bit");
    @(negedge clk); sub_ready = 2'b01; @(negedge clk); sub_ready = 0;
    chk(sub_valid == 0, "submit accepted");
    wr(8'h1C, 32'h8002_0077);
    chk(sub_valid == 2'b10 && sub_req.ch == 3'd2 && sub_req.desc_addr == 16'h77, "submit option 1");
    @(negedge clk); sub_ready = 2'b10; @(negedge clk); sub_ready = 0;
    // completions
    cpl[0] = '{ch: 3'd6, tag: 8'h5A, crc: 16'hBEEF, crc_err: 1'b1, resp_err: 1'b0, chunks: 16'd9};
    cpl[1] = '{ch: 3'd1, tag: 8'h33, crc: 16'h1234, crc_err: 1'b0, resp_err: 1'b1, chunks: 16'd2};
    cpl_valid = 2'b11;
    rd(8'h20, v); chk(v == {16'hBEEF, 8'h5A, 3'd6, 2'b00, 1'b1, 1'b0, 1'b1}, "CPL0_LO");
    rd(8'h24, v); chk(v == 32'd9, "CPL0_HI");
    rd(8'h28, v); chk(v == {16'h1234, 8'h33, 3'd1, 2'b00, 1'b0, 1'b1, 1'b1}, "CPL1_LO");
    rd(8'h2C, v); chk(v == 32'd2, "CPL1_HI");
    @(negedge clk); cpu_wr = 1; cpu_addr = 8'h28; #0.1;
    chk(cpl_pop == 2'b10, "pop option 1");
    cpu_addr = 8'h20; #0.1;
    chk(cpl_pop == 2'b01, "pop option 0");
    @(negedge clk); cpu_wr = 0;
    bmp[0] = 8'h81; bmp[1] = 8'h10; split_busy = 2'b10;
    rd(8'h30, v); chk(v == 32'h0002_1081, "STATUS");
    wr(8'h00, 0); chk(cfg_en == 0, "disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
