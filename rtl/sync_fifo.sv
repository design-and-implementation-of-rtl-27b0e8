// sync_fifo: single-clock first-in first-out buffer used for every command,
// entry, parameter and data buffer in the controller.
//
// An array of DEPTH words with read and write pointers one bit wider than the
// index, so full and empty are told apart by the extra bit. Push when in_valid
// and in_ready; pop when out_valid and out_ready. The head word is shown
// combinationally (first-word fall-through); a word pushed in cycle t can be
// popped in cycle t+1. Reset empties the buffer. DEPTH must be a power of two.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  T             mem [DEPTH];
  logic [AW:0]  wptr, rptr;

  assign count     = wptr - rptr;
  assign in_ready  = (count != DEPTH[AW:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (in_valid && in_ready)   wptr <= wptr + 1'b1;
      if (out_valid && out_ready) rptr <= rptr + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("sync_fifo: DEPTH must be a power of two");
endmodule
