// local_memory: on-chip memory shared by the CPU window, the descriptor
// splitter, the command parser and the read data mover.
//
// It holds descriptors (written by software), the SGL/META entries produced by
// the splitter and the eight channel command rings. One access per cycle: each
// port raises req (with we, addr, wdata) and holds it until gnt; the lowest
// numbered requesting port is granted in the same cycle. A granted read
// returns rdata with rvalid for that port one cycle later. The document names
// this memory but gives neither its size nor its ports; the single-port array
// with fixed-priority sharing is this design's choice. Addresses wrap modulo
// DEPTH. Contents are not reset.
module local_memory
  import dma_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned NPORT = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic     [NPORT-1:0] req,
  input  logic     [NPORT-1:0] we,
  input  lm_addr_t [NPORT-1:0] addr,
  input  data_t    [NPORT-1:0] wdata,
  output logic     [NPORT-1:0] gnt,
  output logic     [NPORT-1:0] rvalid,
  output data_t                rdata
);
  localparam int unsigned IW = $clog2(DEPTH);

  data_t                    mem [DEPTH];
  logic [$clog2(NPORT)-1:0] sel;
  logic                     any;
  logic [IW-1:0]            idx;

  fixed_prio_arb #(.N(NPORT)) u_arb (
    .req(req), .gnt(gnt), .gnt_idx(sel), .gnt_valid(any)
  );

  assign idx = addr[sel][IW-1:0];

  always_ff @(posedge clk) begin
    if (any && we[sel]) mem[idx] <= wdata[sel];
    if (any && !we[sel]) rdata <= mem[idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= '0;
    else        rvalid <= (any && !we[sel]) ? gnt : '0;
  end
endmodule
