// tb_dma_status: completion queue to the CPU.
// Random completions are pushed and popped with random timing. Records must
// come out in order and unchanged, irq must equal "a record is waiting", the
// producer must be held off exactly when DEPTH records wait, and done_cnt
// must count the accepted completions.
`timescale 1ns/1ps
module tb_dma_status;
  import dma_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid, in_ready, head_valid, pop, irq;
  cpl_t in_cpl, head;
  logic [31:0] done_cnt;
  int checks = 0, failures = 0;

  dma_status #(.DEPTH(4)) dut (.*);

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

  cpl_t q[$];
  int pushed = 0, fulls = 0;

  always @(posedge clk) if (rst_n) begin
    chk(irq == (q.size() > 0), "irq");
    chk(head_valid == (q.size() > 0), "head_valid");
    chk(in_ready == (q.size() < 4), "in_ready");
    if (q.size() == 4) fulls++;
    if (head_valid && pop) begin
      cpl_t e;
      e = q.pop_front();
      chk(head == e, "completion record order/content");
    end
    if (in_valid && in_ready) begin q.push_back(in_cpl); pushed++; end
    #0.1 chk(done_cnt == 32'(pushed), "done_cnt");
  end

  initial begin
    in_valid = 0; pop = 0; in_cpl = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      in_valid = ($urandom % 2);
      in_cpl = {$urandom, $urandom};
      pop = (cyc % 400 < 200) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
    end
    @(negedge clk);
    in_valid = 0; pop = 0;
    @(posedge clk);
    chk(fulls > 0, "queue filled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
