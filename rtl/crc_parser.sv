// crc_parser: data verification stage between the read and write data movers.
//
// Every beat of a command's data passes through and updates a CRC16-CCITT
// (generator x^16 + x^12 + x^5 + 1, the shift-register model of the document:
// sixteen stages with the feedback XORed in ahead of bits 0, 5 and 12). The
// 128-bit beat is processed as 128 serial steps unrolled into one cycle, byte 0
// first and each byte MSB first. The register starts at 16'hFFFF (this design's
// choice) and restarts after the last beat of each command. On that eobulk beat
// the final CRC and, if the command asked for a check, the comparison with the
// expected value are attached to the outgoing beat. The read-error flag
// passes through unchanged.
//
// Interface: valid/ready streams in (rbeat_t) and out (cbeat_t). One register
// stage: a beat accepted in cycle t is offered in cycle t+1; full throughput of
// one beat per cycle.
module crc_parser
  import dma_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  rbeat_t in_beat,
  output logic   out_valid,
  input  logic   out_ready,
  output cbeat_t out_beat
);
  localparam logic [15:0] CRC_INIT = 16'hFFFF;

  logic [15:0] crc_q, crc_next;

  assign in_ready = !out_valid || out_ready;
  assign crc_next = crc16_beat(crc_q, in_beat.data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc_q     <= CRC_INIT;
      out_valid <= 1'b0;
      out_beat  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        out_valid        <= 1'b1;
        out_beat.data    <= in_beat.data;
        out_beat.last    <= in_beat.last;
        out_beat.eobulk  <= in_beat.eobulk;
        out_beat.crc     <= crc_next;
        out_beat.crc_err <= in_beat.eobulk && in_beat.crc_chk && (crc_next != in_beat.crc_exp);
        out_beat.rerr    <= in_beat.rerr;
        crc_q            <= in_beat.eobulk ? CRC_INIT : crc_next;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end
endmodule
