// prorc_pkg: types and constants shared by the pRORC firmware blocks.
//
// The firmware sits between a PCI bridge chip (reached over its 32-bit
// add-on local bus) and the Destination Interface Unit (DIU) of the optical
// Detector Data Link. This package holds the register map of the add-on bus
// as this design sees it, the command encoding carried in the incoming
// mailboxes, the word format of the link streams and the Free FIFO entry.
// The 32-bit data width, the four 32-bit mailboxes, the separate DMA
// address/count register sets for read and write and the three fields of a
// Free FIFO entry follow the document; register numbers, opcodes, field
// widths and the status-word code are this design's own choices.
package prorc_pkg;

  localparam int DW = 32;               // add-on bus and link data width

  // Add-on bus register map (this design's numbering).
  typedef enum logic [3:0] {
    REG_IMB0 = 4'd0,  REG_IMB1 = 4'd1,  REG_IMB2 = 4'd2,  REG_IMB3 = 4'd3,
    REG_OMB0 = 4'd4,  REG_OMB1 = 4'd5,  REG_OMB2 = 4'd6,  REG_OMB3 = 4'd7,
    REG_FIFO = 4'd8,                    // write: to PCI FIFO, read: from PCI FIFO
    REG_MWAR = 4'd9,  REG_MWTC = 4'd10, // master write address / byte count
    REG_MRAR = 4'd11, REG_MRTC = 4'd12, // master read address / byte count
    REG_MBEF = 4'd13                    // mailbox status, bit 0: OMB0 still unread
  } aob_reg_e;

  // One add-on bus request from a firmware part to the bus manager.
  typedef struct packed {
    logic        req;
    logic        we;
    aob_reg_e    addr;
    logic [DW-1:0] wdata;
  } aob_req_t;

  // Bus manager ports, in priority order (0 is highest).
  localparam int N_MASTERS = 3;
  localparam int M_CMD  = 0;            // mailbox transfers
  localparam int M_WDMA = 1;
  localparam int M_RDMA = 2;

  // Command opcodes, IMB3[7:0]. IMB3[31] set means "send IMB0 over the link".
  typedef enum logic [7:0] {
    OP_NOP             = 8'h00,
    OP_RESET           = 8'h01,         // clear Free FIFO, stop all engines
    OP_PUSH_FREE       = 8'h02,         // IMB0 base address, IMB1 length (words), IMB2 index
    OP_SET_RFBA        = 8'h03,         // IMB0 Ready FIFO base address
    OP_WDMA_START      = 8'h04,
    OP_WDMA_STOP       = 8'h05,
    OP_RDMA_START      = 8'h06,         // IMB0 host address, IMB1 length (words)
    OP_PG_START        = 8'h07,         // IMB0 seed, IMB1[31:28] pattern, IMB1[23:0] length, IMB2 cycles
    OP_PG_STOP         = 8'h08,
    OP_SET_LOOPBACK    = 8'h09,         // IMB0[0]
    OP_READ_STATUS     = 8'h0A,         // reply: card status word in OMB0
    OP_READ_DDL_STATUS = 8'h0B          // reply: oldest link status word (0 if none)
  } opcode_e;

  localparam int DEST_LINK_BIT = 31;

  typedef struct packed {
    logic [DW-1:0] imb3;
    logic [DW-1:0] imb2;
    logic [DW-1:0] imb1;
    logic [DW-1:0] imb0;
  } mbox_cmd_t;

  // A word on the link: ctrl marks a command or status word.
  typedef struct packed {
    logic          ctrl;
    logic [DW-1:0] data;
  } link_word_t;

  // Low byte of the status word that ends a data block (DTSTW).
  localparam logic [7:0] DTSTW_CODE = 8'h82;

  // Free FIFO entry: base address, block length in 32-bit words, Ready FIFO index.
  localparam int BL_W  = 24;
  localparam int IDX_W = 7;
  typedef struct packed {
    logic [DW-1:0]    ba;
    logic [BL_W-1:0]  bl;
    logic [IDX_W-1:0] idx;
  } free_entry_t;

  // Pattern generator word sequences.
  typedef enum logic [3:0] {
    PAT_INC   = 4'd0,                   // seed, seed+1, ...
    PAT_DEC   = 4'd1,                   // seed, seed-1, ...
    PAT_WALK  = 4'd2,                   // seed rotated left by one each word
    PAT_ALT   = 4'd3,                   // seed, ~seed, seed, ...
    PAT_CONST = 4'd4                    // seed every word
  } pattern_e;

  typedef struct packed {
    pattern_e        pattern;
    logic [DW-1:0]   seed;
    logic [BL_W-1:0] blk_len;           // words per block, at least 1
    logic [DW-1:0]   cycles;            // blocks to send, 0 = forever
  } pg_cfg_t;

endpackage
