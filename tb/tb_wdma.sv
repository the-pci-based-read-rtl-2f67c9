// tb_wdma: self-checking test of the write DMA.
//
// Feeds the engine free pages and a stream of received words (data blocks
// closed by DTSTW words), lets a bridge model store everything in host
// memory, and compares the pages and Ready FIFO entries with the layout
// worked out here: page full -> (count, 0), block end -> (count, DTSTW).
// Also checks the one-word-per-clock rate and the stall when no free page
// is left.
module tb_wdma;
  import prorc_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // free pages
  free_entry_t fq [16];
  int          f_wr = 0, f_rd = 0;
  logic        free_pop, free_valid;
  assign free_valid = (f_rd != f_wr);

  // received words
  link_word_t rxq [256];
  int         r_wr = 0, r_rd = 0;
  logic       rx_pop, rx_valid;
  assign rx_valid = (r_rd != r_wr);

  always @(posedge clk) begin
    if (free_pop) f_rd <= f_rd + 1;
    if (rx_pop) r_rd <= r_rd + 1;
  end

  logic        en = 0, clear = 0;
  aob_req_t    bus_req;
  logic        gnt_ok = 1;
  logic        bus_gnt;
  logic        a2p_full, a2p_empty, p2a_empty, irq;
  logic [31:0] rdata;
  logic        page_open, stall;
  logic [31:0] pages_closed, blocks_closed;
  localparam logic [31:0] RFBA = 32'h0000_8000;

  assign bus_gnt = bus_req.req && gnt_ok;

  wdma dut (
    .clk, .rst_n, .en, .clear,
    .free_valid, .free_head(fq[f_rd % 16]), .free_pop, .rfba(RFBA),
    .rx_valid, .rx_word(rxq[r_rd % 256]), .rx_pop,
    .bus_req, .bus_gnt, .a2p_full, .a2p_empty,
    .page_open, .nofree_stall(stall), .pages_closed, .blocks_closed
  );

  bridge_model #(.MEM_WORDS(16384)) bm (
    .clk, .aob_sel(bus_gnt), .aob_we(bus_req.we), .aob_addr(bus_req.addr),
    .aob_wdata(bus_req.wdata), .aob_rdata(rdata), .imb_irq(irq),
    .a2p_full, .a2p_empty, .p2a_empty
  );

  task automatic add_page(input logic [31:0] ba, input int bl, input int idx);
    fq[f_wr % 16] = '{ba: ba, bl: BL_W'(bl), idx: IDX_W'(idx)};
    f_wr++;
  endtask

  // a block of n data words seeded with s, then its DTSTW
  task automatic add_block(input int n, input logic [31:0] s);
    for (int i = 0; i < n; i++) begin rxq[r_wr % 256] = '{ctrl: 1'b0, data: s + i}; r_wr++; end
    rxq[r_wr % 256] = '{ctrl: 1'b1, data: {n[23:0], DTSTW_CODE}}; r_wr++;
  endtask

  function automatic logic [31:0] m(input logic [31:0] a);
    return bm.mem[a >> 2];
  endfunction

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_first, t_last, npop;
  always @(posedge clk) if (rx_pop && !rxq[r_rd % 256].ctrl) begin
    npop++;
    if (npop == 1) t_first = $time / 10;
    if (npop == 16) t_last = $time / 10;
  end

  int stall_seen = 0;
  always @(posedge clk) if (stall) stall_seen++;

  initial begin
    npop = 0;
    add_page(32'h1000, 16, 0);
    add_page(32'h2000, 16, 1);
    add_page(32'h3000, 8, 2);
    add_page(32'h4000, 100, 3);
    add_block(20, 32'hA000_0000);   // fills page 0, 4 words + DTSTW in page 1
    add_block(8, 32'hB000_0000);    // exactly fills page 2; DTSTW closes page 3 empty
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    en = 1;
    wait (pages_closed == 4);
    repeat (20) @(posedge clk);
    check(t_last - t_first == 15, $sformatf("16 words in %0d clocks", t_last - t_first + 1));
    for (int i = 0; i < 16; i++) check(m(32'h1000 + 4*i) == 32'hA000_0000 + i, "page0 data");
    for (int i = 0; i < 4; i++)  check(m(32'h2000 + 4*i) == 32'hA000_0010 + i, "page1 data");
    for (int i = 0; i < 8; i++)  check(m(32'h3000 + 4*i) == 32'hB000_0000 + i, "page2 data");
    check(m(RFBA + 0)  == 16, "ready0 count");
    check(m(RFBA + 4)  == 0,  "ready0 status");
    check(m(RFBA + 8)  == 4,  "ready1 count");
    check(m(RFBA + 12) == {24'd20, DTSTW_CODE}, "ready1 DTSTW");
    check(m(RFBA + 16) == 8,  "ready2 count");
    check(m(RFBA + 20) == 0,  "ready2 status");
    check(m(RFBA + 24) == 0,  "ready3 count");
    check(m(RFBA + 28) == {24'd8, DTSTW_CODE}, "ready3 DTSTW");
    check(blocks_closed == 2, "two blocks");
    // no free page: engine must stall, then continue with random bus denials
    add_block(5, 32'hC000_0000);
    repeat (30) @(posedge clk);
    check(stall && !page_open, "stall without free page");
    check(pages_closed == 4, "nothing closed while stalled");
    fork
      begin
        repeat (400) begin @(negedge clk); gnt_ok = ($urandom % 4) != 0; end
        gnt_ok = 1;
      end
      begin
        add_page(32'h5000, 50, 9);
        wait (pages_closed == 5);
      end
    join
    repeat (20) @(posedge clk);
    for (int i = 0; i < 5; i++) check(m(32'h5000 + 4*i) == 32'hC000_0000 + i, "page4 data");
    check(m(RFBA + 72) == 5, "ready9 count");
    check(m(RFBA + 76) == {24'd5, DTSTW_CODE}, "ready9 DTSTW");
    check(stall_seen > 0, "stall happened");
    check(bm.errors == 0, "bridge protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
