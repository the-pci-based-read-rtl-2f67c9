// perf_dma: DMA performance-test firmware.
//
// A reduced firmware used to measure the speed of DMA over PCI: a pattern
// generator produces data blocks and a simple DMA engine writes every block
// to the same host buffer, data from base+4 onwards, so a block of n words
// occupies base+4 .. base+4n. After each block a block counter is
// incremented and written to the word at the base address itself; host
// software reads it now and then and derives the transfer rate.
//
// Per block the engine waits for the bridge's add-on-to-PCI FIFO to drain,
// programs MWAR = base+4 and MWTC = 4n, streams the n words into the bridge
// FIFO (one per clock while it has room), waits again, programs MWAR = base
// and MWTC = 4 and writes the counter. It is the only master on the add-on
// bus, so it drives the bus directly. start loads the base address and the
// pattern generator configuration (pattern, block length, number of
// blocks, 0 = forever); stop ends the run after the current block.
// The buffer layout and the counter follow the document's description of the
// test firmware; the control ports and the bus sequence are this design's.
module perf_dma
  import prorc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] base,
  input  pg_cfg_t       cfg,
  input  logic          stop,
  output logic          busy,
  output logic [DW-1:0] block_count,
  // add-on bus (sole master)
  output logic          aob_sel,
  output logic          aob_we,
  output aob_reg_e      aob_addr,
  output logic [DW-1:0] aob_wdata,
  input  logic          a2p_full,
  input  logic          a2p_empty
);

  typedef enum logic [3:0] {
    S_IDLE, S_WAIT_D, S_DWAR, S_DWTC, S_DATA, S_WAIT_C, S_CWAR, S_CWTC, S_CNT
  } state_e;

  state_e          state;
  logic [DW-1:0]   b;
  logic [BL_W-1:0] len;
  logic            pg_busy, pg_valid, pg_ready, pg_stop;
  link_word_t      pg_word;
  logic            stop_req;

  pattern_gen u_pg (
    .clk, .rst_n, .start(start && state == S_IDLE), .cfg, .stop(pg_stop), .busy(pg_busy),
    .valid(pg_valid), .word(pg_word), .ready(pg_ready), .blocks_sent()
  );

  // the generator is stopped only between blocks, never mid-block
  assign pg_stop  = stop_req && (state == S_WAIT_C);
  assign pg_ready = (state == S_DATA) && (pg_word.ctrl || !a2p_full);
  assign busy     = (state != S_IDLE);

  always_comb begin
    aob_sel   = 1'b0;
    aob_we    = 1'b1;
    aob_addr  = REG_FIFO;
    aob_wdata = '0;
    unique case (state)
      S_DWAR: begin aob_sel = 1'b1; aob_addr = REG_MWAR; aob_wdata = b + DW'(4); end
      S_DWTC: begin aob_sel = 1'b1; aob_addr = REG_MWTC; aob_wdata = DW'({len, 2'b00}); end
      S_DATA: begin
        aob_sel   = pg_valid && !pg_word.ctrl && !a2p_full;
        aob_wdata = pg_word.data;
      end
      S_CWAR: begin aob_sel = 1'b1; aob_addr = REG_MWAR; aob_wdata = b; end
      S_CWTC: begin aob_sel = 1'b1; aob_addr = REG_MWTC; aob_wdata = DW'(4); end
      S_CNT:  begin aob_sel = !a2p_full; aob_wdata = block_count + 1'b1; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      b           <= '0;
      len         <= '0;
      block_count <= '0;
      stop_req    <= 1'b0;
    end else begin
      if (stop) stop_req <= 1'b1;
      unique case (state)
        S_IDLE: if (start && cfg.blk_len != 0) begin
          b           <= base;
          len         <= cfg.blk_len;
          block_count <= '0;
          stop_req    <= 1'b0;
          state       <= S_WAIT_D;
        end
        S_WAIT_D: if (a2p_empty) state <= S_DWAR;
        S_DWAR:   state <= S_DWTC;
        S_DWTC:   state <= S_DATA;
        S_DATA:   if (pg_valid && pg_word.ctrl) state <= S_WAIT_C;
        S_WAIT_C: if (a2p_empty) state <= S_CWAR;
        S_CWAR:   state <= S_CWTC;
        S_CWTC:   state <= S_CNT;
        S_CNT: if (!a2p_full) begin
          block_count <= block_count + 1'b1;
          state       <= (pg_busy && !stop_req) ? S_WAIT_D : S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
