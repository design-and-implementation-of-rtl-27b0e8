// desc_splitter: the accelerated descriptor parser ("CPU to local memory" path).
//
// Requests (channel, descriptor address) from the CPU or from a hardware device
// are queued in a request FIFO. A state machine then, in place of software,
// reads the two-word descriptor from local memory and cuts the transfer into
// entries that each cover at most one LBA (lba_dw dwords):
//   * Part 0 runs from host0 up to the next PAGE_DW boundary (or the end of the
//     transfer); part 1 continues at host1.
//   * REMAIN_LEN_CHK0 walks part 0: a whole LBA gives one SGL entry; a tail
//     shorter than an LBA gives a partial SGL entry and leaves remain_len
//     negative, meaning that the rest of that LBA (-remain_len dwords) must be
//     taken from the start of part 1 (CUT1 states).
//   * REMAIN_LEN_CHK1 walks part 1 in whole LBAs.
//   * After the last dword of each LBA a META entry (metadata of meta_dw dwords)
//     is cut when meta_vld is set.
// Entries go to local memory from sba_list_addr upward. Finally a command record
// (entry address, entry count, CRC check fields, tag) is written to the
// channel's ring and the channel write pointer advances. A descriptor with
// link set makes the machine fetch the next descriptor at next_addr for the
// same channel (linked-list mode). Clearing cfg_en returns the machine to idle
// from any state.
//
// The state names and the order of the cutting steps follow the document's
// state diagram. The two-part (page) reading of part 0/part 1, the entry flags,
// the ring layout (channel i uses local-memory words i*CH_DEPTH ...) and the
// handling of cases the diagram leaves open (a part-1 tail shorter than an LBA
// is cut as it is; a descriptor of zero length queues no command) are this
// design's choices.
//
// Timing: one local-memory access at a time; each entry costs a cut, a write
// (1 cycle when granted) and an update cycle.
module desc_splitter
  import dma_pkg::*;
#(
  parameter int unsigned CH_DEPTH   = 16,   // command-ring slots per channel
  parameter int unsigned PAGE_DW    = 1024, // part-0 boundary, dwords (4 KiB)
  parameter int unsigned FIFO_DEPTH = 8,
  localparam int unsigned PTRW      = $clog2(CH_DEPTH) + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_en,
  // requests
  input  logic            cpu_req_valid,
  output logic            cpu_req_ready,
  input  dma_req_t        cpu_req,
  input  logic            hw_req_valid,
  output logic            hw_req_ready,
  input  dma_req_t        hw_req,
  // channel pointers
  input  logic [PTRW-1:0] rptr [NCH],
  output logic [PTRW-1:0] wptr [NCH],
  // local memory port
  output logic            lm_req,
  output logic            lm_we,
  output lm_addr_t        lm_addr,
  output data_t           lm_wdata,
  input  logic            lm_gnt,
  input  logic            lm_rvalid,
  input  data_t           lm_rdata,
  output logic            busy
);
  typedef enum logic [5:0] {
    CUT_IDEAL, ENTRY_ADDR_GET, HOST_ADDR_GET, PART_LEN_GET, CUT0_INIT,
    REMAIN_LEN_CHK0,
    CUT0_SGL_1, CUT0_SGL_WR_1, UPDATE0_SGL_ADDR_1,
    CUT0_SGL, CUT0_SGL_WR, UPDATE0_SGL_ADDR0,
    CUT0_META, CUT0_META_WR, UPDATA0_META_ADDR0,
    CUT1_SGL_0, UPDATE1_REMAIN_LEN1, CUT1_SGL_WR_0, UPDATE1_SGL_ADDR_0,
    CUT0_META_1, CUT0_META_WR_1, UPDATA0_META_ADDR_1,
    CUT2_SGL_INIT, REMAIN_LEN_CHK1,
    CUT2_SGL, CUT2_SGL_WR, UPDATE2_SGL_ADDR0,
    CUT2_META, CUT2_META_WR, UPDATA2_META_ADDR0,
    SGL_CUTTING_OVER
  } state_t;

  typedef logic signed [LENW+1:0] slen_t;

  state_t    state;
  logic      issued;
  ch_t       cur_ch;
  lm_addr_t  desc_addr;
  desc_w0_t  w0;
  desc_w1_t  w1;
  slen_t     remain;
  len_t      consumed, piece;
  addr_t     src_cur, dst_cur, msrc_cur, mdst_cur;
  lm_addr_t  ent_addr;
  len_t      ent_num;
  entry_t    ent;

  // ---------------- request FIFO (CPU requests take precedence) ----------
  logic     fifo_in_valid, fifo_in_ready, fifo_out_valid, fifo_pop;
  dma_req_t fifo_in, fifo_out;

  assign fifo_in_valid = cpu_req_valid || hw_req_valid;
  assign fifo_in       = cpu_req_valid ? cpu_req : hw_req;
  assign cpu_req_ready = fifo_in_ready;
  assign hw_req_ready  = fifo_in_ready && !cpu_req_valid;
  assign fifo_pop      = cfg_en && (state == CUT_IDEAL) && fifo_out_valid;

  sync_fifo #(.T(dma_req_t), .DEPTH(FIFO_DEPTH)) u_req_fifo (
    .clk, .rst_n,
    .in_valid(fifo_in_valid), .in_ready(fifo_in_ready), .in_data(fifo_in),
    .out_valid(fifo_out_valid), .out_ready(fifo_pop), .out_data(fifo_out),
    .count()
  );

  // ---------------- helpers ----------------------------------------------
  function automatic addr_t dw2b(len_t n);
    return addr_t'({n, 2'b00});
  endfunction

  logic [PTRW-1:0] fill;
  logic            ring_full;
  lm_addr_t        ring_slot;
  len_t            page_off, page_left, part1_len;
  cmd_rec_t        rec;

  assign fill      = wptr[cur_ch] - rptr[cur_ch];
  assign ring_full = (fill >= PTRW'(CH_DEPTH));
  assign ring_slot = lm_addr_t'(cur_ch) * lm_addr_t'(CH_DEPTH)
                   + lm_addr_t'(wptr[cur_ch][PTRW-2:0]);
  assign page_off  = len_t'((w0.host0 >> 2) % PAGE_DW);
  assign page_left = len_t'(PAGE_DW) - page_off;
  assign part1_len = (remain > slen_t'(w0.lba_dw)) ? w0.lba_dw : len_t'(remain);

  always_comb begin
    rec            = '0;
    rec.ch         = cur_ch;
    rec.tag        = w1.tag;
    rec.crc_chk    = w1.crc_chk;
    rec.crc_exp    = w1.crc_exp;
    rec.entry_num  = ent_num;
    rec.entry_addr = w1.sba_list_addr;
  end

  // ---------------- local-memory requests --------------------------------
  always_comb begin
    lm_req   = 1'b0;
    lm_we    = 1'b0;
    lm_addr  = ent_addr;
    lm_wdata = data_t'(ent);
    unique case (state)
      ENTRY_ADDR_GET: begin lm_req = !issued; lm_addr = desc_addr + 1'b1; end
      HOST_ADDR_GET:  begin lm_req = !issued; lm_addr = desc_addr; end
      CUT0_SGL_WR_1, CUT0_SGL_WR, CUT0_META_WR, CUT1_SGL_WR_0,
      CUT0_META_WR_1, CUT2_SGL_WR, CUT2_META_WR: begin
        lm_req = 1'b1;
        lm_we  = 1'b1;
      end
      SGL_CUTTING_OVER: begin
        lm_req   = (ent_num != '0) && !ring_full;
        lm_we    = 1'b1;
        lm_addr  = ring_slot;
        lm_wdata = data_t'(rec);
      end
      default: ;
    endcase
  end

  assign busy = (state != CUT_IDEAL) || fifo_out_valid;

  // ---------------- state machine ----------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= CUT_IDEAL;
      issued    <= 1'b0;
      cur_ch    <= '0;
      desc_addr <= '0;
      w0        <= '0;
      w1        <= '0;
      remain    <= '0;
      consumed  <= '0;
      piece     <= '0;
      src_cur   <= '0;
      dst_cur   <= '0;
      msrc_cur  <= '0;
      mdst_cur  <= '0;
      ent_addr  <= '0;
      ent_num   <= '0;
      ent       <= '0;
      for (int i = 0; i < NCH; i++) wptr[i] <= '0;
    end else if (!cfg_en) begin
      state  <= CUT_IDEAL;           // All_status -> CUT_IDEAL
      issued <= 1'b0;
    end else begin
      unique case (state)
        CUT_IDEAL: if (fifo_out_valid) begin
          cur_ch    <= fifo_out.ch;
          desc_addr <= fifo_out.desc_addr;
          state     <= ENTRY_ADDR_GET;
        end
        // word 1: sba_list_addr, metadata and check fields
        ENTRY_ADDR_GET: begin
          if (lm_gnt) issued <= 1'b1;
          if (lm_rvalid) begin
            w1     <= desc_w1_t'(lm_rdata);
            issued <= 1'b0;
            state  <= HOST_ADDR_GET;
          end
        end
        // word 0: host0addr, real_dw_len, ...
        HOST_ADDR_GET: begin
          if (lm_gnt) issued <= 1'b1;
          if (lm_rvalid) begin
            w0     <= desc_w0_t'(lm_rdata);
            issued <= 1'b0;
            state  <= PART_LEN_GET;
          end
        end
        PART_LEN_GET: begin
          remain <= (page_left < w0.total_dw) ? slen_t'(page_left) : slen_t'(w0.total_dw);
          state  <= CUT0_INIT;
        end
        CUT0_INIT: begin
          src_cur  <= w0.host0;
          dst_cur  <= w0.dst;
          msrc_cur <= w1.meta_src;
          mdst_cur <= w1.meta_dst;
          consumed <= '0;
          ent_addr <= w1.sba_list_addr;
          ent_num  <= '0;
          state    <= REMAIN_LEN_CHK0;
        end
        REMAIN_LEN_CHK0: begin
          if (remain < 0)                          state <= CUT1_SGL_0;
          else if (remain == 0)                    state <= CUT2_SGL_INIT;
          else if (remain >= slen_t'(w0.lba_dw))   state <= CUT0_SGL;
          else                                     state <= CUT0_SGL_1;
        end
        // ---- part 0: partial LBA at the page boundary
        CUT0_SGL_1: begin
          ent         <= '0;
          ent.src     <= src_cur;
          ent.dst     <= dst_cur;
          ent.dw_len  <= len_t'(remain);
          ent.eobulk  <= (consumed + len_t'(remain) == w0.total_dw);
          ent.eochunk <= (consumed + len_t'(remain) == w0.total_dw);
          state       <= CUT0_SGL_WR_1;
        end
        CUT0_SGL_WR_1: if (lm_gnt) state <= UPDATE0_SGL_ADDR_1;
        UPDATE0_SGL_ADDR_1: begin
          dst_cur  <= dst_cur + dw2b(len_t'(remain));
          consumed <= consumed + len_t'(remain);
          ent_addr <= ent_addr + 1'b1;
          ent_num  <= ent_num + 1'b1;
          remain   <= ent.eobulk ? slen_t'(0) : remain - slen_t'(w0.lba_dw);
          state    <= REMAIN_LEN_CHK0;
        end
        // ---- part 0: whole LBA
        CUT0_SGL: begin
          ent         <= '0;
          ent.src     <= src_cur;
          ent.dst     <= dst_cur;
          ent.dw_len  <= w0.lba_dw;
          ent.eochunk <= !w1.meta_vld;
          ent.eobulk  <= !w1.meta_vld && (consumed + w0.lba_dw == w0.total_dw);
          state       <= CUT0_SGL_WR;
        end
        CUT0_SGL_WR: if (lm_gnt) state <= UPDATE0_SGL_ADDR0;
        UPDATE0_SGL_ADDR0: begin
          src_cur  <= src_cur + dw2b(w0.lba_dw);
          dst_cur  <= dst_cur + dw2b(w0.lba_dw);
          consumed <= consumed + w0.lba_dw;
          remain   <= remain - slen_t'(w0.lba_dw);
          ent_addr <= ent_addr + 1'b1;
          ent_num  <= ent_num + 1'b1;
          state    <= w1.meta_vld ? CUT0_META : REMAIN_LEN_CHK0;
        end
        // ---- part 1: rest of the LBA split at the page boundary
        CUT1_SGL_0: begin
          piece       <= len_t'(-remain);
          ent         <= '0;
          ent.src     <= w0.host1;
          ent.dst     <= dst_cur;
          ent.dw_len  <= len_t'(-remain);
          ent.eochunk <= !w1.meta_vld;
          ent.eobulk  <= !w1.meta_vld && (consumed + len_t'(-remain) == w0.total_dw);
          state       <= UPDATE1_REMAIN_LEN1;
        end
        UPDATE1_REMAIN_LEN1: begin
          remain <= slen_t'(w0.total_dw) - slen_t'(consumed) - slen_t'(piece);
          state  <= CUT1_SGL_WR_0;
        end
        CUT1_SGL_WR_0: if (lm_gnt) state <= UPDATE1_SGL_ADDR_0;
        UPDATE1_SGL_ADDR_0: begin
          src_cur  <= w0.host1 + dw2b(piece);
          dst_cur  <= dst_cur + dw2b(piece);
          consumed <= consumed + piece;
          ent_addr <= ent_addr + 1'b1;
          ent_num  <= ent_num + 1'b1;
          state    <= w1.meta_vld ? CUT0_META_1 : REMAIN_LEN_CHK1;
        end
        // ---- part 1 start when part 0 ended on an LBA boundary
        CUT2_SGL_INIT: begin
          src_cur <= w0.host1;
          remain  <= slen_t'(w0.total_dw) - slen_t'(consumed);
          state   <= REMAIN_LEN_CHK1;
        end
        REMAIN_LEN_CHK1: state <= (remain > 0) ? CUT2_SGL : SGL_CUTTING_OVER;
        CUT2_SGL: begin
          ent         <= '0;
          ent.src     <= src_cur;
          ent.dst     <= dst_cur;
          ent.dw_len  <= part1_len;
          ent.eochunk <= !w1.meta_vld;
          ent.eobulk  <= !w1.meta_vld && (consumed + part1_len == w0.total_dw);
          state       <= CUT2_SGL_WR;
        end
        CUT2_SGL_WR: if (lm_gnt) state <= UPDATE2_SGL_ADDR0;
        UPDATE2_SGL_ADDR0: begin
          src_cur  <= src_cur + dw2b(ent.dw_len);
          dst_cur  <= dst_cur + dw2b(ent.dw_len);
          consumed <= consumed + ent.dw_len;
          remain   <= remain - slen_t'(ent.dw_len);
          ent_addr <= ent_addr + 1'b1;
          ent_num  <= ent_num + 1'b1;
          state    <= w1.meta_vld ? CUT2_META : REMAIN_LEN_CHK1;
        end
        // ---- metadata entries (same action in the three branches)
        CUT0_META, CUT0_META_1, CUT2_META: begin
          ent         <= '0;
          ent.src     <= msrc_cur;
          ent.dst     <= mdst_cur;
          ent.dw_len  <= len_t'(w1.meta_dw);
          ent.is_meta <= 1'b1;
          ent.eochunk <= 1'b1;
          ent.eobulk  <= (consumed == w0.total_dw);
          state       <= (state == CUT0_META)   ? CUT0_META_WR :
                         (state == CUT0_META_1) ? CUT0_META_WR_1 : CUT2_META_WR;
        end
        CUT0_META_WR:   if (lm_gnt) state <= UPDATA0_META_ADDR0;
        CUT0_META_WR_1: if (lm_gnt) state <= UPDATA0_META_ADDR_1;
        CUT2_META_WR:   if (lm_gnt) state <= UPDATA2_META_ADDR0;
        UPDATA0_META_ADDR0, UPDATA0_META_ADDR_1, UPDATA2_META_ADDR0: begin
          msrc_cur <= msrc_cur + dw2b(len_t'(w1.meta_dw));
          mdst_cur <= mdst_cur + dw2b(len_t'(w1.meta_dw));
          ent_addr <= ent_addr + 1'b1;
          ent_num  <= ent_num + 1'b1;
          state    <= (state == UPDATA0_META_ADDR0) ? REMAIN_LEN_CHK0 : REMAIN_LEN_CHK1;
        end
        // ---- queue the command record on the channel ring
        SGL_CUTTING_OVER: begin
          if (ent_num == '0 || lm_gnt) begin
            if (ent_num != '0) wptr[cur_ch] <= wptr[cur_ch] + 1'b1;
            if (w1.link) begin
              desc_addr <= w1.next_addr;
              state     <= ENTRY_ADDR_GET;
            end else begin
              state <= CUT_IDEAL;
            end
          end
        end
        default: state <= CUT_IDEAL;
      endcase
    end
  end

  // A partial cut is taken only for a tail shorter than one LBA.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == CUT0_SGL_1) |-> (remain > 0 && remain < slen_t'(w0.lba_dw)));
endmodule
