// tb_workload_400k: 400 KB DMA blocks from the link into scattered host
// pages through the full firmware, with the link delivering at 100 MB/s.
//
// The DIU side sends one 32-bit word per 25 MHz link clock (100 MB/s) in
// blocks of 400 KB (102,400 words), each ended by a DTSTW. The host plays
// the read-out software: it sets the Ready FIFO base, keeps the Free FIFO
// topped up with 4 KB pages (1024 words) as pages are closed, and starts
// the write DMA. The bridge model stalls PCI at random 5% of the clocks.
// Checks: every word lands at the right place of the right page, every
// Ready FIFO entry holds the right count and status, and the firmware keeps
// up with the link (how long the DIU was held off is reported and must be
// small). Add-on clock 33 MHz.
module tb_workload_400k;
  import prorc_pkg::*;

  logic clk = 0, lclk = 0, rst_n = 1, lrst_n = 1;
  always #15 clk = ~clk;      // 33 MHz add-on clock
  always #20 lclk = ~lclk;    // 25 MHz link clock: 100 MB/s at one word per clock

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int BLOCK  = 102400;   // 400 KB
  localparam int NBLK   = 2;
  localparam int PAGE   = 1024;     // 4 KB pages
  localparam int NPAGES = (BLOCK + PAGE - 1) / PAGE * NBLK + NBLK;
  localparam logic [31:0] RFBA  = 32'h0000_0000;
  localparam logic [31:0] PBASE = 32'h0001_0000;

  logic          aob_sel, aob_we, imb_irq, a2p_full, a2p_empty, p2a_empty;
  aob_reg_e      aob_addr;
  logic [31:0]   aob_wdata, aob_rdata;
  logic          diu_tx_valid, diu_rx_valid = 0, diu_rx_ready;
  link_word_t    diu_tx_word, diu_rx_word = '0;
  logic [31:0]   pages_closed, blocks_closed, pg_blocks_sent, perf_count;
  logic          wdma_stall, wdma_page_open, perf_busy, perf_sel, perf_we;
  aob_reg_e      perf_addr;
  logic [31:0]   perf_wdata;

  prorc_top dut (
    .clk, .rst_n, .link_clk(lclk), .link_rst_n(lrst_n),
    .aob_sel, .aob_we, .aob_addr, .aob_wdata, .aob_rdata,
    .imb_irq, .a2p_full, .a2p_empty, .p2a_empty,
    .diu_tx_valid, .diu_tx_word, .diu_tx_ready(1'b1),
    .diu_rx_valid, .diu_rx_word, .diu_rx_ready,
    .pages_closed, .blocks_closed, .wdma_stall, .wdma_page_open, .pg_blocks_sent,
    .perf_start(1'b0), .perf_base('0), .perf_cfg('0), .perf_stop(1'b0), .perf_busy,
    .perf_block_count(perf_count), .perf_aob_sel(perf_sel), .perf_aob_we(perf_we),
    .perf_aob_addr(perf_addr), .perf_aob_wdata(perf_wdata), .perf_a2p_full(1'b0),
    .perf_a2p_empty(1'b1)
  );

  // host memory: Ready FIFO at 0, pages from 64 KB on
  bridge_model #(.MEM_WORDS(PBASE / 4 + NPAGES * PAGE), .STALL_PCT(5)) bm (
    .clk, .aob_sel, .aob_we, .aob_addr, .aob_wdata, .aob_rdata,
    .imb_irq, .a2p_full, .a2p_empty, .p2a_empty
  );

  initial begin
    #100000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // link source: word i of block b is {b, i}; DTSTW after each block
  int   sent = 0, held = 0;
  bit   go = 0;
  function automatic link_word_t src_word(input int k);
    int b = k / (BLOCK + 1), i = k % (BLOCK + 1);
    if (i == BLOCK) return '{ctrl: 1'b1, data: {24'(BLOCK), DTSTW_CODE}};
    return '{ctrl: 1'b0, data: (32'(b) << 24) | 32'(i)};
  endfunction
  always @(posedge lclk) begin
    if (diu_rx_valid && diu_rx_ready) sent <= sent + 1;
    if (diu_rx_valid && !diu_rx_ready) held <= held + 1;
  end
  always @(negedge lclk) begin
    diu_rx_valid = go && (sent < NBLK * (BLOCK + 1));
    diu_rx_word  = src_word(sent);
  end

  int given = 0;
  task automatic give_page();
    bm.post_cmd(PBASE + 32'(given * PAGE * 4), 32'(PAGE), 32'(given % 128), 32'(OP_PUSH_FREE));
    given++;
  endtask

  int t = 0, t_first = 0, t_last = 0;
  always @(posedge clk) t++;

  initial begin
    #1 rst_n = 0; lrst_n = 0;
    #100 rst_n = 1; lrst_n = 1;
    repeat (5) @(posedge clk);
    bm.post_cmd(RFBA, 0, 0, 32'(OP_SET_RFBA));
    for (int i = 0; i < 100; i++) give_page();
    bm.post_cmd(0, 0, 0, 32'(OP_WDMA_START));
    repeat (20) @(posedge clk);
    go = 1;
    t_first = t;
    // keep the Free FIFO topped up, never more than 100 pages ahead
    while (blocks_closed < NBLK) begin
      @(posedge clk);
      if (given < NPAGES && given - int'(pages_closed) < 100) give_page();
    end
    t_last = t;
    repeat (50) @(posedge clk);

    // check the pages against the page layout worked out here
    begin
      int pg, bad, badr, left, i, n, base;
      logic [31:0] exp_cnt [NPAGES];
      logic [31:0] exp_st  [NPAGES];
      pg = 0; bad = 0; badr = 0;
      for (int b = 0; b < NBLK; b++) begin
        left = BLOCK; i = 0;
        while (1) begin
          n = (left > PAGE) ? PAGE : left;
          base = PBASE / 4 + pg * PAGE;
          for (int j = 0; j < n; j++)
            if (bm.mem[base + j] != ((32'(b) << 24) | 32'(i + j))) bad++;
          i += n; left -= n;
          // a page that fills up is closed with 0; the DTSTW then closes the
          // page that is open, or a fresh one if the block ended on a boundary
          exp_cnt[pg] = 32'(n);
          if (n == PAGE) begin
            exp_st[pg] = 0;
            pg++;
            if (left == 0) begin
              exp_cnt[pg] = 0; exp_st[pg] = {24'(BLOCK), DTSTW_CODE};
              pg++;
              break;
            end
          end else begin
            exp_st[pg] = {24'(BLOCK), DTSTW_CODE};
            pg++;
            break;
          end
        end
      end
      // Ready FIFO slots are reused every 128 pages: check each slot's last page
      for (int k = 0; k < pg; k++)
        if (k + 128 >= pg)
          if (bm.mem[2 * (k % 128)] != exp_cnt[k] || bm.mem[2 * (k % 128) + 1] != exp_st[k]) badr++;
      check(bad == 0, $sformatf("%0d data words misplaced", bad));
      check(badr == 0, $sformatf("%0d Ready FIFO entries wrong", badr));
      check(int'(pages_closed) == pg, $sformatf("%0d pages closed, %0d expected", pages_closed, pg));
    end
    begin
      real mbs;
      mbs = 4.0 * NBLK * BLOCK / (real'(t_last - t_first) * 30.0e-9) / 1.0e6;
      $display("%0d x 400 KB in %0d clocks: %0.1f MB/s; link held off %0d of %0d link clocks",
               NBLK, t_last - t_first, mbs, held, sent);
      check(mbs > 95.0, "keeps up with a 100 MB/s link");
      check(held * 100 < sent, "link held off less than 1% of the time");
    end
    check(bm.errors == 0, "bridge protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
