// cmd_interpreter: internal control and command manager.
//
// Takes one mailbox command at a time (four words, IMB0..IMB3) and acts on
// its destination. With IMB3[31] set the command is for the far end of the
// link: IMB0 is loaded into the transmitter's command register as soon as
// that register is free. Otherwise IMB3[7:0] is an opcode executed here:
// resetting the DMA side, feeding the Free FIFO, setting the Ready FIFO base
// address, starting and stopping the write DMA, starting a read DMA,
// starting and stopping the pattern generator, selecting loop-back and
// answering status requests. A reply (card status word, or the oldest word
// of the link status FIFO, or 0 if that is empty) is handed to the mailbox
// controller and the next command is taken only after it has been written.
// Commands are accepted one per clock unless the command register, a
// running read DMA or a pending reply holds them back.
//
// Card status word: [0] write DMA on, [1] write DMA waiting for a free page,
// [2] read DMA busy, [3] pattern generator busy, [4] loop-back, [5] Free
// FIFO empty, [6] Free FIFO full, [7] Free FIFO overflowed, [8] link status
// waiting, [9] command register busy, [31:16] Free FIFO entries.
// Interpreting or forwarding by destination follows the document; the
// opcodes and the status layout are this design's.
module cmd_interpreter
  import prorc_pkg::*;
#(
  parameter int FREE_CNT_W = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // command in
  input  logic                  cmd_valid,
  input  mbox_cmd_t             cmd,
  output logic                  cmd_ready,
  // reply out
  output logic                  resp_valid,
  output logic [DW-1:0]         resp_data,
  input  logic                  resp_done,
  // memory manager
  output logic                  dma_clear,
  output logic                  free_push,
  output free_entry_t           free_entry,
  output logic                  rfba_wr,
  output logic [DW-1:0]         rfba_data,
  input  logic                  free_empty,
  input  logic                  free_full,
  input  logic                  free_ovf,
  input  logic [FREE_CNT_W-1:0] free_count,
  // write DMA
  output logic                  wdma_en,
  input  logic                  wdma_stall,
  // read DMA
  output logic                  rdma_start,
  output logic [DW-1:0]         rdma_addr,
  output logic [BL_W-1:0]       rdma_len,
  input  logic                  rdma_busy,
  // pattern generator
  output logic                  pg_start,
  output pg_cfg_t               pg_cfg,
  output logic                  pg_stop,
  input  logic                  pg_busy,
  // DIU interface
  output logic                  loopback,
  output logic                  tx_cmd_wr,
  output logic [DW-1:0]         tx_cmd_data,
  input  logic                  tx_cmd_busy,
  input  logic                  ddl_status_valid,
  input  logic [DW-1:0]         ddl_status,
  output logic                  ddl_status_pop
);

  opcode_e op;
  logic    to_link;
  assign op      = opcode_e'(cmd.imb3[7:0]);
  assign to_link = cmd.imb3[DEST_LINK_BIT];

  logic [DW-1:0] status_word;
  always_comb begin
    status_word        = '0;
    status_word[0]     = wdma_en;
    status_word[1]     = wdma_stall;
    status_word[2]     = rdma_busy;
    status_word[3]     = pg_busy;
    status_word[4]     = loopback;
    status_word[5]     = free_empty;
    status_word[6]     = free_full;
    status_word[7]     = free_ovf;
    status_word[8]     = ddl_status_valid;
    status_word[9]     = tx_cmd_busy;
    status_word[31:16] = 16'(free_count);
  end

  // A command may wait for a resource before it is accepted.
  always_comb begin
    cmd_ready = !resp_valid;
    if (to_link)                           cmd_ready = !tx_cmd_busy && !resp_valid;
    else if (op == OP_RDMA_START)          cmd_ready = !rdma_busy && !rdma_start && !resp_valid;
  end

  logic take;
  assign take = cmd_valid && cmd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_valid     <= 1'b0;
      resp_data      <= '0;
      dma_clear      <= 1'b0;
      free_push      <= 1'b0;
      free_entry     <= '0;
      rfba_wr        <= 1'b0;
      rfba_data      <= '0;
      wdma_en        <= 1'b0;
      rdma_start     <= 1'b0;
      rdma_addr      <= '0;
      rdma_len       <= '0;
      pg_start       <= 1'b0;
      pg_cfg         <= '0;
      pg_stop        <= 1'b0;
      loopback       <= 1'b0;
      tx_cmd_wr      <= 1'b0;
      tx_cmd_data    <= '0;
      ddl_status_pop <= 1'b0;
    end else begin
      dma_clear      <= 1'b0;
      free_push      <= 1'b0;
      rfba_wr        <= 1'b0;
      rdma_start     <= 1'b0;
      pg_start       <= 1'b0;
      pg_stop        <= 1'b0;
      tx_cmd_wr      <= 1'b0;
      ddl_status_pop <= 1'b0;
      if (resp_done) resp_valid <= 1'b0;
      if (take) begin
        if (to_link) begin
          tx_cmd_wr   <= 1'b1;
          tx_cmd_data <= cmd.imb0;
        end else begin
          unique case (op)
            OP_RESET: begin
              dma_clear <= 1'b1;
              wdma_en   <= 1'b0;
              pg_stop   <= 1'b1;
            end
            OP_PUSH_FREE: begin
              free_push  <= (cmd.imb1[BL_W-1:0] != 0);
              free_entry <= '{ba: cmd.imb0, bl: cmd.imb1[BL_W-1:0], idx: cmd.imb2[IDX_W-1:0]};
            end
            OP_SET_RFBA: begin
              rfba_wr   <= 1'b1;
              rfba_data <= cmd.imb0;
            end
            OP_WDMA_START: wdma_en <= 1'b1;
            OP_WDMA_STOP:  wdma_en <= 1'b0;
            OP_RDMA_START: begin
              rdma_start <= 1'b1;
              rdma_addr  <= cmd.imb0;
              rdma_len   <= cmd.imb1[BL_W-1:0];
            end
            OP_PG_START: begin
              pg_start <= 1'b1;
              pg_cfg   <= '{pattern: pattern_e'(cmd.imb1[31:28]), seed: cmd.imb0,
                            blk_len: cmd.imb1[BL_W-1:0], cycles: cmd.imb2};
            end
            OP_PG_STOP:      pg_stop  <= 1'b1;
            OP_SET_LOOPBACK: loopback <= cmd.imb0[0];
            OP_READ_STATUS: begin
              resp_valid <= 1'b1;
              resp_data  <= status_word;
            end
            OP_READ_DDL_STATUS: begin
              resp_valid     <= 1'b1;
              resp_data      <= ddl_status_valid ? ddl_status : '0;
              ddl_status_pop <= ddl_status_valid;
            end
            default: ;
          endcase
        end
      end
    end
  end

endmodule
