// tb_cmd_interpreter: self-checking test of the command interpreter.
//
// Offers one command of each kind and checks the pulse or register it must
// produce, that a link command waits for a free command register, that a
// read DMA start waits for the engine to be idle, and that status replies
// carry the expected bits and hold further commands until written.
module tb_cmd_interpreter;
  import prorc_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic            cmd_valid = 0, cmd_ready, resp_valid, resp_done = 0;
  mbox_cmd_t       cmd = '0;
  logic [31:0]     resp_data;
  logic            dma_clear, free_push, rfba_wr;
  free_entry_t     free_entry;
  logic [31:0]     rfba_data;
  logic            free_empty = 1, free_full = 0, free_ovf = 0;
  logic [7:0]      free_count = 0;
  logic            wdma_en, wdma_stall = 0;
  logic            rdma_start, rdma_busy = 0;
  logic [31:0]     rdma_addr;
  logic [BL_W-1:0] rdma_len;
  logic            pg_start, pg_stop, pg_busy = 0;
  pg_cfg_t         pg_cfg;
  logic            loopback, tx_cmd_wr, tx_cmd_busy = 0;
  logic [31:0]     tx_cmd_data;
  logic            st_valid = 0, st_pop;
  logic [31:0]     st_word = 0;

  cmd_interpreter dut (.*, .ddl_status_valid(st_valid), .ddl_status(st_word),
                       .ddl_status_pop(st_pop));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // offer a command; return after it has been taken
  task automatic issue(input logic [31:0] w0, w1, w2, w3, input int max_wait);
    int n = 0;
    @(negedge clk);
    cmd = '{imb0: w0, imb1: w1, imb2: w2, imb3: w3}; cmd_valid = 1;
    #1;
    while (!cmd_ready && n < max_wait) begin @(negedge clk); #1; n++; end
    @(negedge clk);
    cmd_valid = 0;
    @(negedge clk);
  endtask

  task automatic finish_reply(output logic [31:0] r);
    int n = 0;
    while (!resp_valid && n < 10) begin @(negedge clk); n++; end
    check(resp_valid, "reply offered");
    r = resp_data;
    resp_done = 1; @(negedge clk); resp_done = 0; @(negedge clk);
    check(!resp_valid, "reply withdrawn after done");
  endtask

  // pulses seen since the last clear
  int n_clear, n_push, n_rfba, n_rdma, n_pgs, n_pgstop, n_tx, n_pop;
  always @(posedge clk) begin
    if (dma_clear) n_clear++;
    if (free_push) n_push++;
    if (rfba_wr) n_rfba++;
    if (rdma_start) n_rdma++;
    if (pg_start) n_pgs++;
    if (pg_stop) n_pgstop++;
    if (tx_cmd_wr) n_tx++;
    if (st_pop) n_pop++;
  end

  logic [31:0] r;
  initial begin
    {n_clear, n_push, n_rfba, n_rdma, n_pgs, n_pgstop, n_tx, n_pop} = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    issue(32'h0001_0000, 32'd512, 32'd5, 32'(OP_PUSH_FREE), 5);
    check(n_push == 1 && free_entry.ba == 32'h0001_0000 && free_entry.bl == 512 &&
          free_entry.idx == 5, "free page pushed");
    issue(32'h1, 32'd0, 32'd6, 32'(OP_PUSH_FREE), 5);
    check(n_push == 1, "zero-length page ignored");
    issue(32'h0009_0000, 0, 0, 32'(OP_SET_RFBA), 5);
    check(n_rfba == 1 && rfba_data == 32'h0009_0000, "RFBA written");
    issue(0, 0, 0, 32'(OP_WDMA_START), 5);
    check(wdma_en, "write DMA on");
    issue(32'h4000, 32'd77, 0, 32'(OP_RDMA_START), 5);
    check(n_rdma == 1 && rdma_addr == 32'h4000 && rdma_len == 77, "read DMA started");
    // read DMA start must wait while the engine is busy
    rdma_busy = 1;
    fork
      issue(32'h8000, 32'd3, 0, 32'(OP_RDMA_START), 100);
      begin
        repeat (10) @(posedge clk);
        check(n_rdma == 1, "second read DMA held while busy");
        @(negedge clk); rdma_busy = 0;
      end
    join
    check(n_rdma == 2 && rdma_addr == 32'h8000, "second read DMA after idle");
    issue(32'h55, {4'(PAT_ALT), 4'h0, 24'd100}, 32'd9, 32'(OP_PG_START), 5);
    check(n_pgs == 1 && pg_cfg.pattern == PAT_ALT && pg_cfg.seed == 32'h55 &&
          pg_cfg.blk_len == 100 && pg_cfg.cycles == 9, "generator configured");
    issue(0, 0, 0, 32'(OP_PG_STOP), 5);
    check(n_pgstop == 1, "generator stopped");
    issue(1, 0, 0, 32'(OP_SET_LOOPBACK), 5);
    check(loopback, "loop-back on");
    // link command waits for the command register
    tx_cmd_busy = 1;
    fork
      issue(32'hFEED_0001, 0, 0, 32'h8000_0000, 100);
      begin
        repeat (8) @(posedge clk);
        check(n_tx == 0, "link command held while register busy");
        @(negedge clk); tx_cmd_busy = 0;
      end
    join
    check(n_tx == 1 && tx_cmd_data == 32'hFEED_0001, "link command forwarded");
    // status reply
    free_empty = 0; free_count = 8'd42; pg_busy = 1; wdma_stall = 1;
    issue(0, 0, 0, 32'(OP_READ_STATUS), 5);
    finish_reply(r);
    check(r == (32'd42 << 16 | 32'h1 | 32'h2 | 32'h8 | 32'h10), $sformatf("status word %h", r));
    // link status reply
    st_valid = 1; st_word = 32'h0000_3345;
    issue(0, 0, 0, 32'(OP_READ_DDL_STATUS), 5);
    finish_reply(r);
    check(r == 32'h0000_3345 && n_pop == 1, "link status word returned and popped");
    st_valid = 0;
    issue(0, 0, 0, 32'(OP_READ_DDL_STATUS), 5);
    finish_reply(r);
    check(r == 0 && n_pop == 1, "empty link status gives 0");
    issue(0, 0, 0, 32'(OP_RESET), 5);
    check(n_clear == 1 && !wdma_en && n_pgstop == 2, "reset clears DMA side");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
