// prorc_top: firmware of the PCI-based Read-out Receiver Card (pRORC).
//
// The card links one Detector Data Link (through its Destination Interface
// Unit, DIU) to the memory of a PC. A commercial PCI bridge does the PCI
// protocol; this firmware talks to the bridge over its 32-bit add-on local
// bus and to the DIU over two word streams. It has three parts:
//   * add-on logic: the bus manager (aol_arbiter) and the mailbox
//     controller, which fetches commands from the incoming mailboxes and
//     posts replies to the outgoing mailbox;
//   * internal control: command interpreter, memory manager (Free FIFO and
//     Ready FIFO base), write DMA (link to host pages) and read DMA (host to
//     link);
//   * DIU interface: transmitter (source select, transmit FIFO, command
//     register), test pattern generator and receiver (loop-back, data and
//     status FIFOs).
// The add-on side runs on clk (the bridge's add-on clock, 33 MHz PCI clock
// in the document); the link side runs on link_clk; the FIFOs of the DIU
// interface cross between them.
//
// Bridge side (this design's abstraction of the bridge's add-on bus): one
// access per clock when aob_sel is high, to register aob_addr (see
// prorc_pkg), writing aob_wdata when aob_we is high, otherwise reading
// aob_rdata in the same cycle. Flags from the bridge: imb_irq (command in
// the mailboxes), a2p_full / a2p_empty (add-on-to-PCI FIFO) and p2a_empty
// (PCI-to-add-on FIFO). DIU side: valid/ready streams of link words.
// The partitioning follows the document's architecture figure.
//
// Alongside stands the performance-test firmware (perf_dma), which on the
// real card is loaded instead of the normal firmware to measure DMA speed.
// It has its own bridge bus ports, prefixed perf_, and shares only the clock
// and reset.
module prorc_top
  import prorc_pkg::*;
#(
  parameter int FREE_DEPTH      = 128,
  parameter int TX_DEPTH        = 256,
  parameter int RX_DATA_DEPTH   = 256,
  parameter int RX_STATUS_DEPTH = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          link_clk,
  input  logic          link_rst_n,
  // bridge add-on bus
  output logic          aob_sel,
  output logic          aob_we,
  output aob_reg_e      aob_addr,
  output logic [DW-1:0] aob_wdata,
  input  logic [DW-1:0] aob_rdata,
  input  logic          imb_irq,
  input  logic          a2p_full,
  input  logic          a2p_empty,
  input  logic          p2a_empty,
  // DIU transmit
  output logic          diu_tx_valid,
  output link_word_t    diu_tx_word,
  input  logic          diu_tx_ready,
  // DIU receive
  input  logic          diu_rx_valid,
  input  link_word_t    diu_rx_word,
  output logic          diu_rx_ready,
  // observation
  output logic [DW-1:0] pages_closed,
  output logic [DW-1:0] blocks_closed,
  output logic          wdma_stall,
  output logic          wdma_page_open,
  output logic [DW-1:0] pg_blocks_sent,
  // performance-test firmware, a separate configuration with its own bridge bus
  input  logic          perf_start,
  input  logic [DW-1:0] perf_base,
  input  pg_cfg_t       perf_cfg,
  input  logic          perf_stop,
  output logic          perf_busy,
  output logic [DW-1:0] perf_block_count,
  output logic          perf_aob_sel,
  output logic          perf_aob_we,
  output aob_reg_e      perf_aob_addr,
  output logic [DW-1:0] perf_aob_wdata,
  input  logic          perf_a2p_full,
  input  logic          perf_a2p_empty
);

  localparam int FCW = $clog2(FREE_DEPTH) + 1;

  // ---------------- add-on logic ----------------
  aob_req_t         req [N_MASTERS];
  logic [N_MASTERS-1:0] gnt;

  aol_arbiter u_arb (
    .clk, .rst_n, .req, .gnt,
    .aob_sel, .aob_we, .aob_addr, .aob_wdata
  );

  logic          cmd_valid, cmd_ready, resp_valid, resp_done;
  mbox_cmd_t     cmd;
  logic [DW-1:0] resp_data;

  mailbox_ctrl u_mbox (
    .clk, .rst_n, .imb_irq,
    .bus_req(req[M_CMD]), .bus_gnt(gnt[M_CMD]), .bus_rdata(aob_rdata),
    .cmd_valid, .cmd, .cmd_ready,
    .resp_valid, .resp_data, .resp_done
  );

  // ---------------- internal control ----------------
  logic            dma_clear, free_push, rfba_wr, free_pop, free_valid, free_full, free_ovf;
  free_entry_t     free_entry, free_head;
  logic [DW-1:0]   rfba_data, rfba;
  logic [FCW-1:0]  free_count;
  logic            wdma_en, rdma_start, rdma_busy, pg_start, pg_stop, pg_busy, loopback;
  logic [DW-1:0]   rdma_addr;
  logic [BL_W-1:0] rdma_len;
  pg_cfg_t         pg_cfg;
  logic            tx_cmd_wr, tx_cmd_busy;
  logic [DW-1:0]   tx_cmd_data;
  logic            st_valid, st_pop;
  logic [DW-1:0]   st_word;

  cmd_interpreter #(.FREE_CNT_W(FCW)) u_cmd (
    .clk, .rst_n,
    .cmd_valid, .cmd, .cmd_ready,
    .resp_valid, .resp_data, .resp_done,
    .dma_clear, .free_push, .free_entry, .rfba_wr, .rfba_data,
    .free_empty(!free_valid), .free_full, .free_ovf, .free_count,
    .wdma_en, .wdma_stall,
    .rdma_start, .rdma_addr, .rdma_len, .rdma_busy,
    .pg_start, .pg_cfg, .pg_stop, .pg_busy,
    .loopback, .tx_cmd_wr, .tx_cmd_data, .tx_cmd_busy,
    .ddl_status_valid(st_valid), .ddl_status(st_word), .ddl_status_pop(st_pop)
  );

  mem_manager #(.DEPTH(FREE_DEPTH)) u_mem (
    .clk, .rst_n, .clear(dma_clear),
    .push(free_push), .push_entry(free_entry),
    .pop(free_pop), .head(free_head), .head_valid(free_valid),
    .full(free_full), .overflow(free_ovf), .count(free_count),
    .rfba_wr, .rfba_in(rfba_data), .rfba
  );

  logic       rxd_valid, rxd_pop;
  link_word_t rxd_word;

  wdma u_wdma (
    .clk, .rst_n, .en(wdma_en), .clear(dma_clear),
    .free_valid, .free_head, .free_pop, .rfba,
    .rx_valid(rxd_valid), .rx_word(rxd_word), .rx_pop(rxd_pop),
    .bus_req(req[M_WDMA]), .bus_gnt(gnt[M_WDMA]), .a2p_full, .a2p_empty,
    .page_open(wdma_page_open), .nofree_stall(wdma_stall), .pages_closed, .blocks_closed
  );

  logic          rdma_valid, rdma_ready;
  logic [DW-1:0] rdma_data;

  rdma u_rdma (
    .clk, .rst_n, .start(rdma_start), .addr(rdma_addr), .len(rdma_len),
    .stop(dma_clear), .busy(rdma_busy),
    .bus_req(req[M_RDMA]), .bus_gnt(gnt[M_RDMA]), .bus_rdata(aob_rdata), .p2a_empty,
    .tx_valid(rdma_valid), .tx_data(rdma_data), .tx_ready(rdma_ready)
  );

  // ---------------- DIU interface ----------------
  logic          pg_valid, pg_ready;
  link_word_t    pg_word;

  pattern_gen u_pg (
    .clk, .rst_n, .start(pg_start), .cfg(pg_cfg), .stop(pg_stop), .busy(pg_busy),
    .valid(pg_valid), .word(pg_word), .ready(pg_ready), .blocks_sent(pg_blocks_sent)
  );

  logic       tx_valid, tx_ready, lb_active, lb_ready;
  link_word_t tx_word;

  diu_tx #(.DEPTH(TX_DEPTH)) u_tx (
    .clk, .rst_n, .sel_pg(pg_busy),
    .rdma_valid, .rdma_data, .rdma_ready,
    .pg_valid, .pg_word, .pg_ready,
    .cmd_wr(tx_cmd_wr), .cmd_data(tx_cmd_data), .cmd_busy(tx_cmd_busy),
    .link_clk, .link_rst_n, .tx_valid, .tx_word, .tx_ready
  );

  // In loop-back the transmitter feeds the receiver and nothing goes to the DIU.
  assign diu_tx_valid = tx_valid && !lb_active;
  assign diu_tx_word  = tx_word;
  assign tx_ready     = lb_active ? lb_ready : diu_tx_ready;

  diu_rx #(.DATA_DEPTH(RX_DATA_DEPTH), .STATUS_DEPTH(RX_STATUS_DEPTH)) u_rx (
    .clk, .rst_n, .loopback,
    .data_valid(rxd_valid), .data_word(rxd_word), .data_pop(rxd_pop),
    .status_valid(st_valid), .status_word(st_word), .status_pop(st_pop),
    .link_clk, .link_rst_n, .lb_active,
    .rx_valid(diu_rx_valid), .rx_word(diu_rx_word), .rx_ready(diu_rx_ready),
    .lb_valid(tx_valid), .lb_word(tx_word), .lb_ready
  );

  // ---------------- performance-test firmware ----------------
  perf_dma u_perf (
    .clk, .rst_n, .start(perf_start), .base(perf_base), .cfg(perf_cfg), .stop(perf_stop),
    .busy(perf_busy), .block_count(perf_block_count),
    .aob_sel(perf_aob_sel), .aob_we(perf_aob_we), .aob_addr(perf_aob_addr),
    .aob_wdata(perf_aob_wdata), .a2p_full(perf_a2p_full), .a2p_empty(perf_a2p_empty)
  );

endmodule
