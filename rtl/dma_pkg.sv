// dma_pkg: types and constants shared by the accelerated DMA controller.
//
// The controller moves data between two AXI4 address spaces (called "DDR" here).
// Software places descriptors in an on-chip local memory and submits a
// (channel, descriptor address) request; hardware splits each descriptor into
// scatter-gather entries (SGL and META entries), queues a command record on one
// of eight channel rings, and the data movers then execute the entries.
//
// Sizes: the eight channels and the 128-bit data path follow the document; the
// field layouts below, the local-memory word size (one 128-bit word per entry or
// command record, two per descriptor) and the 16-beat maximum AXI burst are this
// design's own choices. All lengths count 32-bit dwords ("dw") and must be
// multiples of 4 dw; all addresses must be 16-byte aligned.
package dma_pkg;

  localparam int unsigned NCH        = 8;    // independent channels
  localparam int unsigned AXI_AW     = 32;   // AXI address width
  localparam int unsigned AXI_DW     = 128;  // AXI data width = local-memory word width
  localparam int unsigned AXI_IDW    = 4;
  localparam int unsigned DW_PER_BEAT = AXI_DW / 32;  // 4 dwords per beat
  localparam int unsigned MAX_BURST  = 16;   // beats per AXI burst
  localparam int unsigned LM_AW      = 16;   // local-memory address field width
  localparam int unsigned LENW       = 16;   // dword length field width
  localparam int unsigned CHW        = $clog2(NCH);

  typedef logic [AXI_AW-1:0] addr_t;
  typedef logic [AXI_DW-1:0] data_t;
  typedef logic [LM_AW-1:0]  lm_addr_t;
  typedef logic [LENW-1:0]   len_t;
  typedef logic [CHW-1:0]    ch_t;

  localparam logic [1:0] AXI_BURST_INCR = 2'b01;
  localparam logic [1:0] AXI_RESP_OKAY  = 2'b00;
  localparam logic [1:0] AXI_RESP_SLVERR = 2'b10;
  localparam logic [2:0] AXI_SIZE_16B   = 3'd4;

  // Descriptor word 1 (local memory address desc_addr+1).
  typedef struct packed {
    addr_t     meta_src;    // host address of the first LBA's metadata
    addr_t     meta_dst;    // destination of the metadata (entry_meta_addr)
    lm_addr_t  sba_list_addr; // where the split entries are stored
    lm_addr_t  next_addr;   // next descriptor (linked-list mode)
    logic [15:0] crc_exp;   // expected CRC16 of the moved data
    logic [7:0]  tag;       // software tag, returned in the completion
    logic        crc_chk;   // compare the CRC with crc_exp
    logic        meta_vld;  // each LBA is followed by a metadata entry
    logic        link;      // another descriptor follows at next_addr
    logic [4:0]  meta_dw;   // metadata dwords per LBA
  } desc_w1_t;

  // Descriptor word 0 (local memory address desc_addr).
  typedef struct packed {
    addr_t host0;           // first host data part (up to a page boundary)
    addr_t host1;           // second host data part
    addr_t dst;             // destination of the data (entry_data_addr)
    len_t  total_dw;        // real_dw_len
    len_t  lba_dw;          // LBA (chunk) size
  } desc_w0_t;

  // One split entry (SGL or META), one local-memory word.
  typedef struct packed {
    logic [44:0] rsvd;
    logic        is_meta;
    logic        eochunk;   // last entry of an LBA
    logic        eobulk;    // last entry of the command
    len_t        dw_len;
    addr_t       src;
    addr_t       dst;
  } entry_t;

  // Command record on a channel ring, one local-memory word.
  typedef struct packed {
    logic [58:0] rsvd;
    ch_t         ch;
    logic [7:0]  tag;
    logic        crc_chk;
    logic [15:0] crc_exp;
    len_t        entry_num; // sba_list_num
    lm_addr_t    entry_addr;
  } cmd_rec_t;

  // Request into the descriptor splitter.
  typedef struct packed {
    ch_t      ch;
    lm_addr_t desc_addr;
  } dma_req_t;

  // Per-entry write parameters, read data mover -> write data mover.
  typedef struct packed {
    addr_t      dst;
    len_t       dw_len;
    logic       eochunk;
    logic       eobulk;
    ch_t        ch;
    logic [7:0] tag;
  } wparam_t;

  // Data beat out of the read data mover.
  typedef struct packed {
    data_t       data;
    logic        last;      // last beat of an entry
    logic        eobulk;    // last beat of the command
    logic        crc_chk;
    logic [15:0] crc_exp;
    logic        rerr;      // the read response of this beat was not OKAY
  } rbeat_t;

  // Data beat out of the CRC parser.
  typedef struct packed {
    data_t       data;
    logic        last;
    logic        eobulk;
    logic [15:0] crc;       // valid on the eobulk beat
    logic        crc_err;   // valid on the eobulk beat
    logic        rerr;      // read response error on this beat
  } cbeat_t;

  // Completion status returned to the CPU.
  typedef struct packed {
    ch_t         ch;
    logic [7:0]  tag;
    logic [15:0] crc;
    logic        crc_err;
    logic        resp_err;
    logic [15:0] chunks;
  } cpl_t;

  // AXI4 channel payloads (valid/ready travel separately).
  typedef struct packed {
    logic [AXI_IDW-1:0] id;
    addr_t              addr;
    logic [7:0]         len;
    logic [2:0]         size;
    logic [1:0]         burst;
  } axi_ax_t;

  typedef struct packed {
    logic [AXI_IDW-1:0] id;
    data_t              data;
    logic [1:0]         resp;
    logic               last;
  } axi_r_t;

  typedef struct packed {
    data_t               data;
    logic [AXI_DW/8-1:0] strb;
    logic                last;
  } axi_w_t;

  typedef struct packed {
    logic [AXI_IDW-1:0] id;
    logic [1:0]         resp;
  } axi_b_t;

  // CRC16-CCITT (x^16 + x^12 + x^5 + 1), one serial step per bit, MSB of each
  // byte first, bytes in address order (byte 0 = bits 7:0 of a beat).
  function automatic logic [15:0] crc16_beat(logic [15:0] crc_in, data_t d);
    logic [15:0] c;
    logic        fb;
    c = crc_in;
    for (int b = 0; b < AXI_DW / 8; b++) begin
      for (int i = 7; i >= 0; i--) begin
        fb = c[15] ^ d[b*8 + i];
        c  = {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
      end
    end
    return c;
  endfunction

endpackage
