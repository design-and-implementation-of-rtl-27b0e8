// tb_local_memory: random multi-port traffic against a shadow array.
// Each of the four ports randomly raises read or write requests and holds
// them until granted. Every cycle the grant must go to the lowest-numbered
// requesting port only; a granted read must return, one cycle later and on
// that port's rvalid alone, the word the shadow array holds at grant time.
`timescale 1ns/1ps
module tb_local_memory;
  import dma_pkg::*;
  localparam int D = 64, P = 4;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic     [P-1:0] req, we, gnt, rvalid;
  lm_addr_t [P-1:0] addr;
  data_t    [P-1:0] wdata;
  data_t            rdata;
  int checks = 0, failures = 0;

  local_memory #(.DEPTH(D), .NPORT(P)) dut (.*);

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

  data_t shadow [D];
  logic  exp_rv;
  int    exp_port;
  data_t exp_data;
  int    reads = 0;
  logic [P-1:0] last_gnt = '0;

  always @(posedge clk) if (rst_n) begin
    int win;
    // read data of the previous grant
    if (exp_rv) begin
      chk(rvalid == (P'(1) << exp_port), "rvalid on the granted port only");
      chk(rdata == exp_data, "read data");
      reads++;
    end else begin
      chk(rvalid == '0, "no rvalid without a read");
    end
    win = -1;
    for (int i = P - 1; i >= 0; i--) if (req[i]) win = i;
    chk(gnt == (win < 0 ? '0 : P'(1) << win), "fixed-priority grant");
    exp_rv = 0;
    last_gnt = gnt;
    if (win >= 0) begin
      if (we[win]) shadow[addr[win] % D] = wdata[win];
      else begin
        exp_rv   = 1;
        exp_port = win;
        exp_data = shadow[addr[win] % D];
      end
    end
  end

  initial begin
    req = '0; we = '0; addr = '0; wdata = '0; exp_rv = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initialise every word through port 3
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      req[3] = 1; we[3] = 1; addr[3] = lm_addr_t'(i); wdata[3] = {4{$urandom}};
    end
    @(negedge clk);
    req = '0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        if (last_gnt[p]) req[p] = 0;   // granted at the last edge
      end
      for (int p = 0; p < P; p++) begin
        if (!req[p] && ($urandom % 3 == 0)) begin
          req[p] = 1; we[p] = $urandom % 2; addr[p] = lm_addr_t'($urandom % D);
          wdata[p] = {$urandom, $urandom, $urandom, $urandom};
        end
      end
    end
    @(negedge clk);
    req = '0;
    repeat (3) @(posedge clk);
    chk(reads > 100, "enough reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
