// cmd_parser: takes the next command of the highest-priority pending channel.
//
// When the read data mover can accept a command, the fixed-priority arbiter
// picks the lowest-numbered channel whose bit is set in the monitor's pending
// bitmap. The parser reads that channel's command record from local memory
// (ring slot channel*CH_DEPTH + read pointer), pulses fsm_start so the
// monitor advances the channel's read pointer, and offers the record to the
// read data mover. One command is handled at a time; from grant to offer takes
// three cycles when local memory is free. The document shows this path (the
// local-memory state machine of the monitoring diagram and the command parser
// feeding the read data mover) without detail; the sequencing here is this
// design's own.
module cmd_parser
  import dma_pkg::*;
#(
  parameter int unsigned CH_DEPTH = 16,
  localparam int unsigned PTRW    = $clog2(CH_DEPTH) + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_en,
  input  logic [NCH-1:0]  bmp,
  input  logic [PTRW-1:0] rptr [NCH],
  output logic            fsm_start,
  output ch_t             fsm_ch,
  // local memory read port
  output logic            lm_req,
  output lm_addr_t        lm_addr,
  input  logic            lm_gnt,
  input  logic            lm_rvalid,
  input  data_t           lm_rdata,
  // command out
  output logic            cmd_valid,
  input  logic            cmd_ready,
  output cmd_rec_t        cmd
);
  typedef enum logic [1:0] {P_IDLE, P_READ, P_WAIT, P_SEND} pstate_t;

  pstate_t        state;
  logic [NCH-1:0] gnt;
  ch_t            gnt_idx, ch_q;
  logic           gnt_valid;

  fixed_prio_arb #(.N(NCH)) u_arb (
    .req(bmp), .gnt(gnt), .gnt_idx(gnt_idx), .gnt_valid(gnt_valid)
  );

  assign lm_req    = (state == P_READ);
  assign lm_addr   = lm_addr_t'(ch_q) * lm_addr_t'(CH_DEPTH)
                   + lm_addr_t'(rptr[ch_q][PTRW-2:0]);
  assign cmd_valid = (state == P_SEND);
  assign fsm_start = (state == P_SEND) && cmd_ready;
  assign fsm_ch    = ch_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= P_IDLE;
      ch_q  <= '0;
      cmd   <= '0;
    end else begin
      unique case (state)
        P_IDLE: if (cfg_en && gnt_valid) begin
          ch_q  <= gnt_idx;
          state <= P_READ;
        end
        P_READ: if (lm_gnt) state <= P_WAIT;
        P_WAIT: if (lm_rvalid) begin
          cmd   <= cmd_rec_t'(lm_rdata);
          state <= P_SEND;
        end
        P_SEND: if (cmd_ready) state <= P_IDLE;
        default: state <= P_IDLE;
      endcase
    end
  end
endmodule
