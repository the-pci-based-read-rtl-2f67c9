// diu_tx: transmitter of the DIU interface.
//
// The transmit FIFO takes its input from one of two sources, the read DMA
// or the test pattern generator (sel_pg high selects the generator; the
// source not selected sees ready low). It is a dual-clock FIFO: written in
// the add-on clock, read in the link clock, so it also evens out the two
// data rates. Next to it sits the command register: a link command written
// with cmd_wr is held (cmd_busy high) and handed to the link clock domain by
// a toggle handshake; the link side sends it as a control word ahead of any
// FIFO data and acknowledges, which frees the register again.
//
// Link side: a valid/ready stream of link words (ctrl marks a command or
// status word) in the link clock. Crossing latency is two to three link
// clocks for the FIFO and the command register.
// One FIFO plus one command register and the two selectable sources follow
// the document; the depth, the handshake and command-first order are this
// design's choices.
module diu_tx
  import prorc_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sel_pg,
  // read DMA source
  input  logic          rdma_valid,
  input  logic [DW-1:0] rdma_data,
  output logic          rdma_ready,
  // pattern generator source
  input  logic          pg_valid,
  input  link_word_t    pg_word,
  output logic          pg_ready,
  // command register
  input  logic          cmd_wr,
  input  logic [DW-1:0] cmd_data,
  output logic          cmd_busy,
  // link side
  input  logic          link_clk,
  input  logic          link_rst_n,
  output logic          tx_valid,
  output link_word_t    tx_word,
  input  logic          tx_ready
);

  // ---- source select and transmit FIFO ----
  logic       wr_full, wr_en, rd_empty, rd_en;
  link_word_t wr_word, rd_word;

  assign rdma_ready = !sel_pg && !wr_full;
  assign pg_ready   =  sel_pg && !wr_full;
  assign wr_en      = sel_pg ? pg_valid : rdma_valid;
  assign wr_word    = sel_pg ? pg_word : '{ctrl: 1'b0, data: rdma_data};

  async_fifo #(.WIDTH($bits(link_word_t)), .DEPTH(DEPTH)) u_fifo (
    .wr_clk(clk), .wr_rst_n(rst_n), .wr_en(wr_en), .wr_data(wr_word), .wr_full(wr_full),
    .rd_clk(link_clk), .rd_rst_n(link_rst_n), .rd_en(rd_en), .rd_data(rd_word),
    .rd_empty(rd_empty)
  );

  // ---- command register, add-on side ----
  logic [DW-1:0] cmd_reg;
  logic          req_tgl, ack_s1, ack_s2;
  logic          ack_tgl;                // link side

  assign cmd_busy = (req_tgl != ack_s2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_reg <= '0;
      req_tgl <= 1'b0;
      ack_s1  <= 1'b0;
      ack_s2  <= 1'b0;
    end else begin
      ack_s1 <= ack_tgl;
      ack_s2 <= ack_s1;
      if (cmd_wr && !cmd_busy) begin
        cmd_reg <= cmd_data;
        req_tgl <= ~req_tgl;
      end
    end
  end

  // ---- link side: command first, then FIFO data ----
  logic req_s1, req_s2;
  logic cmd_pend;

  always_ff @(posedge link_clk or negedge link_rst_n) begin
    if (!link_rst_n) begin
      req_s1  <= 1'b0;
      req_s2  <= 1'b0;
      ack_tgl <= 1'b0;
    end else begin
      req_s1 <= req_tgl;
      req_s2 <= req_s1;
      if (cmd_pend && tx_ready) ack_tgl <= ~ack_tgl;
    end
  end

  // cmd_reg is stable while the request is pending, so it is read here directly.
  assign cmd_pend = (req_s2 != ack_tgl);
  assign tx_valid = cmd_pend || !rd_empty;
  assign tx_word  = cmd_pend ? '{ctrl: 1'b1, data: cmd_reg} : rd_word;
  assign rd_en    = !cmd_pend && tx_ready && !rd_empty;

endmodule
