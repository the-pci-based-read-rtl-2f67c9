// wdma: write DMA controller with page closing (scattered memory model).
//
// Moves received link data into host memory pages taken from the Free
// FIFO. When data is waiting and a free page is available, the engine
// takes the page (base address BA, length BL words, Ready FIFO index IDX),
// waits until the bridge's add-on-to-PCI FIFO has drained, and programs the
// bridge's master write address and byte-count registers (MWAR = BA,
// MWTC = 4*BL). It then writes one received data word per granted bus cycle
// into the bridge FIFO, which the bridge forwards over PCI.
//
// A page is closed in one of two cases: it is full (BL words written), or
// the block ends, which the receiver marks with the block status word
// (DTSTW, a control word in the data stream). To close it the engine waits
// for the bridge FIFO to drain, points MWAR at RFBA + 8*IDX, sets MWTC to 8
// and writes two words: the number of words written to the page, then 0 if
// the block goes on past the page end, or the DTSTW itself if the block
// ended. Software finds finished pages by looking at the Ready FIFO entries.
// A full page is closed at once with 0, even if the very next word is the
// DTSTW; that DTSTW then closes a fresh page with a count of 0.
//
// When data is waiting and no free page is available the engine stalls
// (nofree_stall high). en low stops the engine between words; clear
// abandons the open page. Throughput is one word per clock.
// The page model, Free FIFO fields and the two Ready FIFO words are the
// document's; the bus sequence and the full-page rule are this design's.
module wdma
  import prorc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            clear,
  // Free FIFO head and Ready FIFO base
  input  logic            free_valid,
  input  free_entry_t     free_head,
  output logic            free_pop,
  input  logic [DW-1:0]   rfba,
  // receiver data FIFO (first-word fall-through)
  input  logic            rx_valid,
  input  link_word_t      rx_word,
  output logic            rx_pop,
  // add-on bus and bridge FIFO flags
  output aob_req_t        bus_req,
  input  logic            bus_gnt,
  input  logic            a2p_full,
  input  logic            a2p_empty,
  // status
  output logic            page_open,
  output logic            nofree_stall,
  output logic [DW-1:0]   pages_closed,
  output logic [DW-1:0]   blocks_closed
);

  typedef enum logic [3:0] {
    S_IDLE, S_OPEN_WAIT, S_MWAR, S_MWTC, S_STREAM,
    S_CLOSE_WAIT, S_RWAR, S_RWTC, S_RCOUNT, S_RSTATUS
  } state_e;

  state_e          state;
  free_entry_t     page;
  logic [BL_W-1:0] cnt;
  logic [DW-1:0]   close_word;

  logic stream_data;
  assign stream_data = (state == S_STREAM) && en && rx_valid && !rx_word.ctrl;

  always_comb begin
    bus_req = '{req: 1'b0, we: 1'b1, addr: REG_FIFO, wdata: '0};
    unique case (state)
      S_MWAR:    bus_req = '{req: 1'b1, we: 1'b1, addr: REG_MWAR, wdata: page.ba};
      S_MWTC:    bus_req = '{req: 1'b1, we: 1'b1, addr: REG_MWTC, wdata: DW'({page.bl, 2'b00})};
      S_STREAM:  bus_req = '{req: stream_data && !a2p_full, we: 1'b1, addr: REG_FIFO,
                             wdata: rx_word.data};
      S_RWAR:    bus_req = '{req: 1'b1, we: 1'b1, addr: REG_MWAR,
                             wdata: rfba + DW'({page.idx, 3'b000})};
      S_RWTC:    bus_req = '{req: 1'b1, we: 1'b1, addr: REG_MWTC, wdata: DW'(8)};
      S_RCOUNT:  bus_req = '{req: !a2p_full, we: 1'b1, addr: REG_FIFO, wdata: DW'(cnt)};
      S_RSTATUS: bus_req = '{req: !a2p_full, we: 1'b1, addr: REG_FIFO, wdata: close_word};
      default: ;
    endcase
  end

  assign free_pop     = (state == S_IDLE) && en && rx_valid && free_valid && !clear;
  assign rx_pop       = (state == S_STREAM) && en && rx_valid &&
                        (rx_word.ctrl || bus_gnt) && !clear;
  assign page_open    = (state != S_IDLE);
  assign nofree_stall = (state == S_IDLE) && en && rx_valid && !free_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      page          <= '0;
      cnt           <= '0;
      close_word    <= '0;
      pages_closed  <= '0;
      blocks_closed <= '0;
    end else if (clear) begin
      state         <= S_IDLE;
      pages_closed  <= '0;
      blocks_closed <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (free_pop) begin
          page  <= free_head;
          cnt   <= '0;
          state <= S_OPEN_WAIT;
        end
        S_OPEN_WAIT: if (a2p_empty) state <= S_MWAR;
        S_MWAR:      if (bus_gnt) state <= S_MWTC;
        S_MWTC:      if (bus_gnt) state <= S_STREAM;
        S_STREAM: if (en && rx_valid) begin
          if (rx_word.ctrl) begin
            close_word    <= rx_word.data;
            blocks_closed <= blocks_closed + 1'b1;
            state         <= S_CLOSE_WAIT;
          end else if (bus_gnt) begin
            cnt <= cnt + 1'b1;
            if (cnt + 1'b1 == page.bl) begin
              close_word <= '0;
              state      <= S_CLOSE_WAIT;
            end
          end
        end
        S_CLOSE_WAIT: if (a2p_empty) state <= S_RWAR;
        S_RWAR:       if (bus_gnt) state <= S_RWTC;
        S_RWTC:       if (bus_gnt) state <= S_RCOUNT;
        S_RCOUNT:     if (bus_gnt) state <= S_RSTATUS;
        S_RSTATUS: if (bus_gnt) begin
          pages_closed <= pages_closed + 1'b1;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_page_bound : assert property (@(posedge clk) disable iff (!rst_n)
    state == S_STREAM |-> cnt < page.bl);

endmodule
