// fixed_prio_arb: fixed-priority arbiter for the DMA channels.
//
// When several channels request the shared data movers at once, the channel
// with the lowest index wins: channel 0 has the highest priority, channel N-1
// the lowest. The fixed scheme follows the document; the direction of the
// priority order (low index first) is this design's choice. Purely
// combinational: gnt is one-hot (or zero when nothing requests) and gnt_idx is
// the index of the granted channel.
module fixed_prio_arb #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         req,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 gnt_valid
);
  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        gnt       = '0;
        gnt[i]    = 1'b1;
        gnt_idx   = i[$clog2(N)-1:0];
        gnt_valid = 1'b1;
      end
    end
  end
endmodule
