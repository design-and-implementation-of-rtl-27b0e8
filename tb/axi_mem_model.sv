// axi_mem_model: behavioural AXI4 slave memory standing in for the DDR.
//
// Not synthesizable; used by the testbenches only. 128-bit words, WORDS deep,
// addressed by addr[4 +: log2(WORDS)]. INCR bursts; read and write requests
// queue in order. When stall is set, or at random when rnd_ready is set, the
// ready/valid outputs are held low for a cycle. Reads and writes that touch the
// word range [err_lo, err_hi] are answered with SLVERR (the data is still
// returned or stored).
// The array "mem" is accessed directly by the testbench to load and check data.
module axi_mem_model
  import dma_pkg::*;
#(
  parameter int unsigned WORDS = 65536
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    stall,
  input  logic    rnd_ready,
  input  int      err_lo,
  input  int      err_hi,
  input  logic    arvalid,
  output logic    arready,
  input  axi_ax_t ar,
  output logic    rvalid,
  input  logic    rready,
  output axi_r_t  r,
  input  logic    awvalid,
  output logic    awready,
  input  axi_ax_t aw,
  input  logic    wvalid,
  output logic    wready,
  input  axi_w_t  w,
  output logic    bvalid,
  input  logic    bready,
  output axi_b_t  b
);
  localparam int unsigned IW = $clog2(WORDS);

  data_t   mem [WORDS];
  axi_ax_t arq[$], awq[$];
  logic [1:0] bq[$];
  int      rbeat, wbeat;
  logic    wrerr;
  logic    go_ar, go_r, go_aw, go_w, go_b;

  function automatic int widx(addr_t a, int beat);
    return int'(a[4 +: IW]) + beat;
  endfunction

  always_ff @(posedge clk) begin
    go_ar <= !stall && (!rnd_ready || ($urandom % 4 != 0));
    go_r  <= !stall && (!rnd_ready || ($urandom % 4 != 0));
    go_aw <= !stall && (!rnd_ready || ($urandom % 4 != 0));
    go_w  <= !stall && (!rnd_ready || ($urandom % 4 != 0));
    go_b  <= !stall && (!rnd_ready || ($urandom % 4 != 0));
  end

  assign arready = go_ar && arq.size() < 8;
  assign awready = go_aw && awq.size() < 8;
  assign rvalid  = go_r && arq.size() > 0;
  assign wready  = go_w && awq.size() > 0;
  assign bvalid  = go_b && bq.size() > 0;

  always_comb begin
    r = '0;
    b = '0;
    if (arq.size() > 0) begin
      r.data = mem[widx(arq[0].addr, rbeat) % WORDS];
      r.last = (rbeat == int'(arq[0].len));
      r.resp = (widx(arq[0].addr, rbeat) >= err_lo && widx(arq[0].addr, rbeat) <= err_hi)
             ? AXI_RESP_SLVERR : AXI_RESP_OKAY;
    end
    if (bq.size() > 0) b.resp = bq[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arq.delete();
      awq.delete();
      bq.delete();
      rbeat <= 0;
      wbeat <= 0;
      wrerr <= 1'b0;
    end else begin
      if (rvalid && rready) begin
        if (rbeat == int'(arq[0].len)) begin
          void'(arq.pop_front());
          rbeat <= 0;
        end else begin
          rbeat <= rbeat + 1;
        end
      end
      if (arvalid && arready) arq.push_back(ar);
      if (bvalid && bready) void'(bq.pop_front());
      if (wvalid && wready) begin
        automatic int i = widx(awq[0].addr, wbeat);
        automatic logic e = wrerr || (i >= err_lo && i <= err_hi);
        mem[i % WORDS] <= w.data;
        if (w.last != (wbeat == int'(awq[0].len)))
          $error("axi_mem_model: WLAST does not match AWLEN");
        if (wbeat == int'(awq[0].len)) begin
          void'(awq.pop_front());
          bq.push_back(e ? AXI_RESP_SLVERR : AXI_RESP_OKAY);
          wbeat <= 0;
          wrerr <= 1'b0;
        end else begin
          wbeat <= wbeat + 1;
          wrerr <= e;
        end
      end
      if (awvalid && awready) awq.push_back(aw);
    end
  end
endmodule
