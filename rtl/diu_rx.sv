// diu_rx: receiver of the DIU interface.
//
// Words arrive in the link clock either from the DIU or, in loop-back mode,
// straight from this card's own transmitter (self-test). The loop-back
// select is synchronised into the link clock here and also returned as
// lb_active, so the transmitter output can be kept off the DIU meanwhile.
// Two dual-clock FIFOs follow. The data FIFO takes data words and the block
// status words (DTSTW: control words with DTSTW_CODE in the low byte) in
// their original order, so the write DMA sees where each block ends. All
// other control words (link and front-end status, replies to commands) go
// to the status FIFO, from which the command interpreter answers the host.
// Each input is accepted only when its target FIFO has room (rx_ready /
// lb_ready). Both FIFOs are read first-word fall-through in the add-on clock.
// Two receiver FIFOs and the loop-back from the transmitter follow the
// document; which words go to which FIFO, the depths and the DTSTW code are
// this design's choices.
module diu_rx
  import prorc_pkg::*;
#(
  parameter int DATA_DEPTH   = 256,
  parameter int STATUS_DEPTH = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          loopback,
  // data FIFO read side
  output logic          data_valid,
  output link_word_t    data_word,
  input  logic          data_pop,
  // status FIFO read side
  output logic          status_valid,
  output logic [DW-1:0] status_word,
  input  logic          status_pop,
  // link side
  input  logic          link_clk,
  input  logic          link_rst_n,
  output logic          lb_active,
  input  logic          rx_valid,
  input  link_word_t    rx_word,
  output logic          rx_ready,
  input  logic          lb_valid,
  input  link_word_t    lb_word,
  output logic          lb_ready
);

  logic lb_s1;
  always_ff @(posedge link_clk or negedge link_rst_n) begin
    if (!link_rst_n) begin
      lb_s1     <= 1'b0;
      lb_active <= 1'b0;
    end else begin
      lb_s1     <= loopback;
      lb_active <= lb_s1;
    end
  end

  link_word_t in_word;
  logic       in_valid, in_ready, is_data;
  logic       dfull, sfull, dempty, sempty;

  assign in_valid = lb_active ? lb_valid : rx_valid;
  assign in_word  = lb_active ? lb_word  : rx_word;
  assign is_data  = !in_word.ctrl || (in_word.data[7:0] == DTSTW_CODE);
  assign in_ready = is_data ? !dfull : !sfull;
  assign rx_ready = !lb_active && in_ready;
  assign lb_ready =  lb_active && in_ready;

  async_fifo #(.WIDTH($bits(link_word_t)), .DEPTH(DATA_DEPTH)) u_data (
    .wr_clk(link_clk), .wr_rst_n(link_rst_n), .wr_en(in_valid && is_data),
    .wr_data(in_word), .wr_full(dfull),
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_en(data_pop), .rd_data(data_word),
    .rd_empty(dempty)
  );

  async_fifo #(.WIDTH(DW), .DEPTH(STATUS_DEPTH)) u_status (
    .wr_clk(link_clk), .wr_rst_n(link_rst_n), .wr_en(in_valid && !is_data),
    .wr_data(in_word.data), .wr_full(sfull),
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_en(status_pop), .rd_data(status_word),
    .rd_empty(sempty)
  );

  assign data_valid   = !dempty;
  assign status_valid = !sempty;

endmodule
