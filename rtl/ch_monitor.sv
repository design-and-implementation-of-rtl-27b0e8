// ch_monitor: multi-channel monitoring circuit.
//
// For each of the NCH channels it keeps a shadow copy of the channel write
// pointer (the "Lm2shadow" register, one cycle behind the splitter's pointer)
// and the locally maintained read pointer. A per-channel comparator flags the
// channel as pending in bmp when the two differ and gives the number of
// commands still waiting in remain; equal pointers mean the channel is idle.
// All channels are compared in parallel every cycle. When the command parser
// takes a command (fsm_start with its channel), that channel's read pointer
// advances; the read pointers are returned to the splitter as ring occupancy.
// The structure follows the document's monitoring diagram; the one-cycle shadow
// delay and the pointer width (one bit wider than the ring index) are this
// design's choices.
module ch_monitor
  import dma_pkg::*;
#(
  parameter int unsigned CH_DEPTH = 16,
  localparam int unsigned PTRW    = $clog2(CH_DEPTH) + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PTRW-1:0] wptr   [NCH],
  input  logic            fsm_start,
  input  ch_t             fsm_ch,
  output logic [PTRW-1:0] rptr   [NCH],
  output logic [PTRW-1:0] remain [NCH],
  output logic [NCH-1:0]  bmp
);
  logic [PTRW-1:0] shadow [NCH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) begin
        shadow[i] <= '0;
        rptr[i]   <= '0;
      end
    end else begin
      for (int i = 0; i < NCH; i++) begin
        shadow[i] <= wptr[i];
        if (fsm_start && fsm_ch == ch_t'(i)) rptr[i] <= rptr[i] + 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NCH; i++) begin
      remain[i] = shadow[i] - rptr[i];
      bmp[i]    = (shadow[i] != rptr[i]);
    end
  end

  // A channel is only started while it has a pending command.
  assert property (@(posedge clk) disable iff (!rst_n) fsm_start |-> bmp[fsm_ch]);
endmodule
