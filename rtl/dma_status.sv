// dma_status: data-move status path back to the CPU ("LM2CPU").
//
// Each command the write data mover finishes leaves one completion record
// (channel, tag, CRC, CRC error, write-response error, LBA chunk count) in a
// completion queue. The head record is visible to the register block; the CPU
// removes it with pop. irq is high while the queue holds a record. If the queue
// is full the write data mover waits. done_cnt counts completions since reset.
// The document names the status module only; queue depth and record contents
// are this design's choices.
module dma_status
  import dma_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  cpl_t        in_cpl,
  output logic        head_valid,
  output cpl_t        head,
  input  logic        pop,
  output logic        irq,
  output logic [31:0] done_cnt
);
  sync_fifo #(.T(cpl_t), .DEPTH(DEPTH)) u_cpl_q (
    .clk, .rst_n, .in_valid(in_valid), .in_ready(in_ready), .in_data(in_cpl),
    .out_valid(head_valid), .out_ready(pop), .out_data(head), .count()
  );

  assign irq = head_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     done_cnt <= '0;
    else if (in_valid && in_ready)  done_cnt <= done_cnt + 1'b1;
  end
endmodule
