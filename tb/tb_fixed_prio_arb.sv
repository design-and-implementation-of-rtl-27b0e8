// tb_fixed_prio_arb: exhaustive check of the fixed-priority arbiter.
// Every one of the 256 request patterns of eight channels is applied; the
// grant must be one-hot on the lowest-numbered requester (channel 0 highest
// priority), its index must match, and no request must give no grant.
module tb_fixed_prio_arb;
  logic [7:0] req, gnt;
  logic [2:0] gnt_idx;
  logic       gnt_valid;
  int checks = 0, failures = 0;

  fixed_prio_arb #(.N(8)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 256; p++) begin
      automatic int win = -1;
      req = 8'(p);
      #1;
      for (int i = 7; i >= 0; i--) if (p[i]) win = i;
      checks++;
      if (win < 0) begin
        if (gnt != 0 || gnt_valid) begin failures++; $display("FAIL: grant without request"); end
      end else if (gnt != (8'b1 << win) || gnt_idx != 3'(win) || !gnt_valid) begin
        failures++;
        $display("FAIL: req=%b gnt=%b idx=%0d expected channel %0d", req, gnt, gnt_idx, win);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
