// tb_prorc_top: end-to-end test of the pRORC firmware at its default sizes.
//
// A bridge model stands for the PCI bridge and the host memory; the test
// plays the host software through the mailboxes and the DIU on the link
// side. Sequence:
//   1. set the Ready FIFO base, give the card free pages, switch loop-back
//      on, start the write DMA and run the pattern generator: the blocks go
//      round the loop into host pages; too few pages are given at first, so
//      the write DMA must stall until more arrive;
//   2. read the card status through the outgoing mailbox, twice without the
//      host reading the first reply, so the second must wait;
//   3. loop-back off: a read DMA sends a host buffer to the DIU, a link
//      command goes out as a control word;
//   4. the DIU sends data blocks and a status word: the data lands in host
//      pages, the status word is fetched with a status request.
// Every page and Ready FIFO entry is compared with a reference model of the
// scattered memory layout kept here. Each mechanism is counted and must
// have happened at least once.
module tb_prorc_top;
  import prorc_pkg::*;

  logic clk = 0, lclk = 0, rst_n = 1, lrst_n = 1;
  always #15 clk = ~clk;      // 33 MHz add-on clock
  always #10 lclk = ~lclk;    // link clock

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic          aob_sel, aob_we, imb_irq, a2p_full, a2p_empty, p2a_empty;
  aob_reg_e      aob_addr;
  logic [31:0]   aob_wdata, aob_rdata;
  logic          diu_tx_valid, diu_tx_ready = 0, diu_rx_valid = 0, diu_rx_ready;
  link_word_t    diu_tx_word, diu_rx_word = '0;
  logic [31:0]   pages_closed, blocks_closed, pg_blocks_sent;
  logic          wdma_stall, wdma_page_open;
  logic          perf_start = 0, perf_stop = 0, perf_busy, perf_sel, perf_we;
  logic          perf_a2p_full, perf_a2p_empty, perf_p2a_empty, perf_irq;
  logic [31:0]   perf_base = 0, perf_count, perf_wdata, perf_rdata;
  aob_reg_e      perf_addr;
  pg_cfg_t       perf_cfg = '0;

  prorc_top dut (
    .clk, .rst_n, .link_clk(lclk), .link_rst_n(lrst_n),
    .aob_sel, .aob_we, .aob_addr, .aob_wdata, .aob_rdata,
    .imb_irq, .a2p_full, .a2p_empty, .p2a_empty,
    .diu_tx_valid, .diu_tx_word, .diu_tx_ready,
    .diu_rx_valid, .diu_rx_word, .diu_rx_ready,
    .pages_closed, .blocks_closed, .wdma_stall, .wdma_page_open, .pg_blocks_sent,
    .perf_start, .perf_base, .perf_cfg, .perf_stop, .perf_busy, .perf_block_count(perf_count),
    .perf_aob_sel(perf_sel), .perf_aob_we(perf_we), .perf_aob_addr(perf_addr),
    .perf_aob_wdata(perf_wdata), .perf_a2p_full, .perf_a2p_empty
  );

  bridge_model #(.MEM_WORDS(4096)) perf_bm (
    .clk, .aob_sel(perf_sel), .aob_we(perf_we), .aob_addr(perf_addr), .aob_wdata(perf_wdata),
    .aob_rdata(perf_rdata), .imb_irq(perf_irq), .a2p_full(perf_a2p_full),
    .a2p_empty(perf_a2p_empty), .p2a_empty(perf_p2a_empty)
  );

  bridge_model #(.MEM_WORDS(65536), .STALL_PCT(30)) bm (
    .clk, .aob_sel, .aob_we, .aob_addr, .aob_wdata, .aob_rdata,
    .imb_irq, .a2p_full, .a2p_empty, .p2a_empty
  );

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model of the page layout ----------------
  localparam logic [31:0] RFBA = 32'h0002_0000;
  free_entry_t    ref_pages [$];
  logic [31:0]    exp_mem [int];
  bit             ref_open = 0;
  free_entry_t    ref_pg;
  int             ref_cnt = 0;
  int             n_full_close = 0, n_block_close = 0;

  function automatic void ref_close(input logic [31:0] st);
    exp_mem[int'(RFBA + {ref_pg.idx, 3'b000})]     = 32'(ref_cnt);
    exp_mem[int'(RFBA + {ref_pg.idx, 3'b000} + 4)] = st;
    ref_open = 0;
    if (st == 0) n_full_close++; else n_block_close++;
  endfunction

  function automatic void ref_word(input link_word_t w);
    if (!ref_open) begin
      ref_pg = ref_pages.pop_front();
      ref_open = 1; ref_cnt = 0;
    end
    if (w.ctrl) ref_close(w.data);
    else begin
      exp_mem[int'(ref_pg.ba + 32'(4 * ref_cnt))] = w.data;
      ref_cnt++;
      if (ref_cnt == int'(ref_pg.bl)) ref_close(0);
    end
  endfunction

  function automatic void ref_block(input logic [31:0] seed, input int len);
    for (int i = 0; i < len; i++) ref_word('{ctrl: 1'b0, data: seed + 32'(i)});
    ref_word('{ctrl: 1'b1, data: {24'(len), DTSTW_CODE}});
  endfunction

  task automatic check_memory(input string what);
    int bad = 0;
    foreach (exp_mem[a]) if (bm.mem[a >> 2] != exp_mem[a]) begin
      if (bad < 5) $display("  %s: mem[%h] = %h, expected %h", what, a, bm.mem[a >> 2], exp_mem[a]);
      bad++;
    end
    check(bad == 0, $sformatf("%s: %0d of %0d words differ", what, bad, exp_mem.size()));
  endtask

  // ---------------- host helpers ----------------
  int next_idx = 0;
  task automatic give_page(input logic [31:0] ba, input int bl);
    bm.post_cmd(ba, 32'(bl), 32'(next_idx), 32'(OP_PUSH_FREE));
    ref_pages.push_back('{ba: ba, bl: BL_W'(bl), idx: IDX_W'(next_idx)});
    next_idx++;
  endtask

  task automatic op(input opcode_e o, input logic [31:0] w0 = 0, w1 = 0, w2 = 0);
    bm.post_cmd(w0, w1, w2, 32'(o));
  endtask

  task automatic wait_for(input string what, input int max_clk, ref logic [31:0] v, input logic [31:0] target);
    int n = 0;
    while (v < target && n < max_clk) begin @(posedge clk); n++; end
    check(v >= target, what);
  endtask

  // ---------------- link side ----------------
  link_word_t tx_seen [$];
  always @(negedge lclk) diu_tx_ready = ($urandom % 4) != 0;
  always @(posedge lclk) if (lrst_n && diu_tx_valid && diu_tx_ready) tx_seen.push_back(diu_tx_word);

  link_word_t rx_src [$];
  always @(negedge lclk) begin
    if (diu_rx_valid && diu_rx_ready && rx_src.size() != 0) void'(rx_src.pop_front());
  end
  always @(negedge lclk) #1 begin
    diu_rx_valid = (rx_src.size() != 0);
    diu_rx_word  = diu_rx_valid ? rx_src[0] : '0;
  end

  // ---------------- mechanism counters ----------------
  int m_stall = 0, m_a2p_full = 0, m_cmd_over_dma = 0, m_omb_wait = 0, m_lb = 0;
  int m_tx_cmd = 0, m_rdma = 0, m_rx_status = 0, m_pg = 0;
  always @(posedge clk) begin
    if (wdma_stall) m_stall++;
    if (a2p_full && wdma_page_open) m_a2p_full++;
    if (dut.gnt[M_CMD] && (dut.req[M_WDMA].req || dut.req[M_RDMA].req)) m_cmd_over_dma++;
    if (aob_sel && !aob_we && aob_addr == REG_MBEF && aob_rdata[0]) m_omb_wait++;
    if (dut.lb_ready && dut.tx_valid) m_lb++;
    if (dut.rdma_valid) m_rdma++;
    if (dut.pg_valid && dut.pg_ready) m_pg++;
  end

  logic [31:0] r;
  initial begin
    #1 rst_n = 0; lrst_n = 0;
    #100 rst_n = 1; lrst_n = 1;
    repeat (5) @(posedge clk);

    // ---- 1. loop-back pattern run into host pages ----
    op(OP_SET_RFBA, RFBA);
    op(OP_SET_LOOPBACK, 1);
    for (int i = 0; i < 5; i++) give_page(32'h0000_1000 + 32'(i) * 32'h400, 40);
    op(OP_WDMA_START);
    op(OP_PG_START, 32'h0100_0000, {4'(PAT_INC), 4'h0, 24'd70}, 32'd6);
    // 6 blocks of 70 words need more than the 5 pages of 40: expect a stall
    begin
      int n = 0;
      while (m_stall < 20 && n < 20000) begin @(posedge clk); n++; end
    end
    check(m_stall > 0, "write DMA stalled without free pages");
    for (int i = 0; i < 8; i++) give_page(32'h0000_4000 + 32'(i) * 32'h400, 64);
    for (int b = 0; b < 6; b++) ref_block(32'h0100_0000, 70);
    wait_for("all generator blocks closed", 40000, blocks_closed, 6);
    repeat (50) @(posedge clk);
    check(pg_blocks_sent == 6, "generator sent six blocks");
    check_memory("loop-back run");

    // ---- 2. status replies through the outgoing mailbox ----
    op(OP_READ_STATUS);
    op(OP_READ_STATUS);
    repeat (60) @(posedge clk);
    check(bm.omb_writes == 1, "second reply waits for the host");
    bm.read_reply(r, 1000);
    check(r[0] && r[4] && !r[2] && r[31:16] == 16'(ref_pages.size()),
          $sformatf("status: WDMA on, loop-back, %0d free pages left (%h)", ref_pages.size(), r));
    bm.read_reply(r, 1000);
    check(bm.omb_writes == 2, "second reply written after first was read");

    // ---- 3. read DMA and link command to the DIU ----
    op(OP_SET_LOOPBACK, 0);
    repeat (20) @(posedge clk);
    for (int i = 0; i < 300; i++) bm.mem[(32'h0003_0000 >> 2) + i] = 32'hD000_0000 + 32'(i);
    op(OP_RDMA_START, 32'h0003_0000, 32'd300);
    bm.post_cmd(32'h0000_ABC1, 0, 0, 32'h8000_0000);
    begin
      int n = 0;
      while (tx_seen.size() < 301 && n < 20000) begin @(posedge clk); n++; end
    end
    repeat (20) @(posedge clk);
    begin
      int nd = 0, nc = 0;
      foreach (tx_seen[i]) begin
        if (tx_seen[i].ctrl) begin
          nc++;
          check(tx_seen[i].data == 32'h0000_ABC1, "link command word");
        end else begin
          check(tx_seen[i].data == 32'hD000_0000 + 32'(nd), $sformatf("read DMA word %0d", nd));
          nd++;
        end
      end
      check(nd == 300 && nc == 1, $sformatf("DIU got %0d data words, %0d commands", nd, nc));
      m_tx_cmd = nc;
    end

    // ---- 4. data and status from the DIU ----
    for (int i = 0; i < 6; i++) give_page(32'h0000_8000 + 32'(i) * 32'h400, 100);
    for (int b = 0; b < 3; b++) begin
      for (int i = 0; i < 130; i++) rx_src.push_back('{ctrl: 1'b0, data: 32'hE000_0000 + 32'(b * 1000 + i)});
      rx_src.push_back('{ctrl: 1'b1, data: {24'(130), DTSTW_CODE}});
      for (int i = 0; i < 130; i++) ref_word('{ctrl: 1'b0, data: 32'hE000_0000 + 32'(b * 1000 + i)});
      ref_word('{ctrl: 1'b1, data: {24'(130), DTSTW_CODE}});
    end
    rx_src.push_back('{ctrl: 1'b1, data: 32'h0000_7745});
    wait_for("DIU blocks closed", 40000, blocks_closed, 9);
    repeat (50) @(posedge clk);
    check_memory("DIU run");
    op(OP_READ_DDL_STATUS);
    bm.read_reply(r, 2000);
    check(r == 32'h0000_7745, $sformatf("link status word returned (%h)", r));
    if (r == 32'h0000_7745) m_rx_status++;
    check(bm.errors == 0, "bridge protocol");

    // ---- 5. performance-test firmware: 400-word blocks into one buffer ----
    @(negedge clk);
    perf_cfg = '{pattern: PAT_INC, seed: 32'h9000_0000, blk_len: 24'd400, cycles: 32'd3};
    perf_base = 32'h100; perf_start = 1;
    @(negedge clk); perf_start = 0;
    begin
      int n = 0;
      while (perf_busy && n < 5000) begin @(negedge clk); n++; end
      check(n < 3 * 420, $sformatf("three 400-word blocks in %0d clocks", n));
    end
    check(perf_bm.mem[32'h100 >> 2] == 3 && perf_count == 3, "block counter at base address");
    begin
      int bad = 0;
      for (int i = 0; i < 400; i++) if (perf_bm.mem[(32'h104 >> 2) + i] != 32'h9000_0000 + 32'(i)) bad++;
      check(bad == 0, "performance-test data after the counter");
    end

    // ---- mechanisms ----
    check(n_full_close > 0,   "page closed at its boundary");
    check(n_block_close > 0,  "page closed at block end");
    check(m_stall > 0,        "no-free-page stall");
    check(m_a2p_full > 0,     "bridge FIFO full stall");
    check(m_cmd_over_dma > 0, "command transfer won over DMA");
    check(m_omb_wait > 0,     "outgoing mailbox guarded");
    check(m_lb > 0,           "loop-back");
    check(m_pg > 0,           "pattern generator");
    check(m_rdma == 300,      "read DMA");
    check(m_tx_cmd == 1,      "link command");
    check(m_rx_status == 1,   "link status reply");
    $display("mechanisms: full-close %0d block-close %0d stall %0d a2p-full %0d cmd-over-dma %0d omb-wait %0d loopback %0d pg %0d rdma %0d txcmd %0d rxstatus %0d",
             n_full_close, n_block_close, m_stall, m_a2p_full, m_cmd_over_dma, m_omb_wait, m_lb, m_pg,
             m_rdma, m_tx_cmd, m_rx_status);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
