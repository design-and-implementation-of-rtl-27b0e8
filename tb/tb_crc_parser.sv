// tb_crc_parser: checks the CRC16-CCITT data verification stage.
// Random commands of 1..6 beats pass through with random stalls on both
// sides. The data and flags must come out unchanged and in order; the CRC on
// each command's last beat is compared with a bit-serial reference computed
// here (initial value FFFF, generator 1021), and the error flag must follow a
// deliberately right or wrong expected value. The reference itself is first
// checked against the standard value 16'h29B1 for the bytes "123456789". The
// register stage gives a one-cycle latency, checked on the first beat.
`timescale 1ns/1ps
module tb_crc_parser;
  import dma_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  rbeat_t in_beat;
  cbeat_t out_beat;
  int checks = 0, failures = 0;

  crc_parser dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_crc_byte(logic [15:0] c, logic [7:0] d);
    for (int i = 7; i >= 0; i--) begin
      logic x = c[15] ^ d[i];
      c = c << 1;
      if (x) c ^= 16'h1021;
    end
    return c;
  endfunction

  function automatic logic [15:0] ref_crc(logic [15:0] c, data_t d);
    for (int by = 0; by < 16; by++) c = ref_crc_byte(c, d[by*8 +: 8]);
    return c;
  endfunction

  rbeat_t q[$];
  logic [15:0] expcrc[$];

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // output side
  always @(posedge clk) if (rst_n) begin
    out_ready <= ($urandom % 3) != 0;
    if (out_valid && out_ready) begin
      rbeat_t e;
      e = q.pop_front();
      chk(out_beat.data == e.data && out_beat.last == e.last && out_beat.eobulk == e.eobulk &&
          out_beat.rerr == e.rerr,
          "data or flags changed");
      if (e.eobulk) begin
        logic [15:0] c;
        c = expcrc.pop_front();
        chk(out_beat.crc == c, $sformatf("crc %h expected %h", out_beat.crc, c));
        chk(out_beat.crc_err == (e.crc_chk && e.crc_exp != c), "crc_err flag");
      end
    end
  end

  initial begin
    logic [15:0] c;
    logic [7:0] s9 [9] = '{"1","2","3","4","5","6","7","8","9"};
    c = 16'hFFFF;
    foreach (s9[i]) c = ref_crc_byte(c, s9[i]);
    chk(c == 16'h29B1, "reference model check value");
    in_valid = 0; in_beat = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency: one beat, output valid exactly one cycle after acceptance
    @(negedge clk);
    in_valid = 1; in_beat = '0; in_beat.data = 128'h1; in_beat.last = 1; in_beat.eobulk = 1;
    q.push_back(in_beat); expcrc.push_back(ref_crc(16'hFFFF, 128'h1));
    force out_ready = 0;
    @(posedge clk); #0.1;
    in_valid = 0;
    chk(out_valid, "one-cycle latency");
    release out_ready;
    for (int cmd = 0; cmd < 200; cmd++) begin
      automatic int n = 1 + $urandom % 6;
      automatic logic [15:0] cc = 16'hFFFF;
      automatic bit chkon = $urandom % 2;
      automatic bit good = $urandom % 2;
      rbeat_t bt [];
      bt = new[n];
      for (int i = 0; i < n; i++) begin
        bt[i] = '0;
        bt[i].data = {$urandom, $urandom, $urandom, $urandom};
        cc = ref_crc(cc, bt[i].data);
      end
      for (int i = 0; i < n; i++) begin
        bt[i].last = ($urandom % 2) || i == n - 1;
        bt[i].eobulk = (i == n - 1);
        bt[i].crc_chk = chkon;
        bt[i].crc_exp = good ? cc : cc ^ 16'h0100;
        bt[i].rerr = ($urandom % 8 == 0);
      end
      expcrc.push_back(cc);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        while ($urandom % 4 == 0) @(negedge clk);
        in_valid = 1; in_beat = bt[i];
        while (!in_ready) @(negedge clk);
        q.push_back(bt[i]);
        @(posedge clk);
        #0.1 in_valid = 0;
      end
    end
    while (q.size() > 0) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
