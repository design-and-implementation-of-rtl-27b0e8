// tb_ch_monitor: checks the channel monitor against a counter model.
// Random write-pointer increments on random channels and random fsm_start
// pulses on pending channels. After each edge: the shadow pointer equals the
// write pointer of the previous cycle, the read pointer counts the starts of
// its own channel only, bmp flags exactly the channels whose shadow and read
// pointers differ, and remain is their difference.
`timescale 1ns/1ps
module tb_ch_monitor;
  import dma_pkg::*;
  localparam int CD = 4, PW = 3;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic [PW-1:0] wptr [NCH], rptr [NCH], remain [NCH];
  logic          fsm_start;
  ch_t           fsm_ch;
  logic [NCH-1:0] bmp;
  int checks = 0, failures = 0;

  ch_monitor #(.CH_DEPTH(CD)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  logic [PW-1:0] m_shadow [NCH], m_rptr [NCH];
  int starts = 0;

  initial begin
    fsm_start = 0; fsm_ch = 0;
    for (int i = 0; i < NCH; i++) begin wptr[i] = 0; m_shadow[i] = 0; m_rptr[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // model update for the edge that just passed is done below; drive next
      fsm_start = 0;
      begin
        automatic int c = $urandom % NCH;
        if (bmp[c] && ($urandom % 2)) begin fsm_start = 1; fsm_ch = ch_t'(c); end
      end
      @(posedge clk);
      #0.1;
      for (int i = 0; i < NCH; i++) begin
        if (fsm_start && fsm_ch == ch_t'(i)) m_rptr[i] = m_rptr[i] + 1'b1;
        m_shadow[i] = wptr[i];
      end
      if (fsm_start) starts++;
      // the splitter side: bump a write pointer if the ring is not full
      begin
        automatic int c = $urandom % NCH;
        if (PW'(wptr[c] - m_rptr[c]) < PW'(CD) && ($urandom % 2)) wptr[c] = wptr[c] + 1'b1;
      end
      #0.2;
      for (int i = 0; i < NCH; i++) begin
        chk(rptr[i] == m_rptr[i], $sformatf("rptr[%0d]", i));
        chk(bmp[i] == (m_shadow[i] != m_rptr[i]), $sformatf("bmp[%0d]", i));
        chk(remain[i] == PW'(m_shadow[i] - m_rptr[i]), $sformatf("remain[%0d]", i));
      end
    end
    chk(starts > 200, "enough starts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
