// tb_perf_dma: self-checking test of the performance-test firmware.
//
// Runs the generator for a number of blocks into one host buffer held by a
// bridge model, checks that the block counter word at the base address
// counts every block, that the data of the last block sits from base+4 on,
// and that a block of n words takes n plus a small fixed number of clocks
// (one word per clock, i.e. 132 MB/s at 33 MHz, when PCI does not stall).
// A second run with an endless generator ended by stop
// checks that the counter stays consistent.
module tb_perf_dma;
  import prorc_pkg::*;

  logic clk = 0, rst_n = 1;
  always #15 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic          start = 0, stop = 0, busy, sel, we, a2p_full, a2p_empty, p2a_empty, irq;
  logic [31:0]   base = 0, cnt, wdata, rdata;
  aob_reg_e      addr;
  pg_cfg_t       cfg = '0;

  perf_dma dut (.clk, .rst_n, .start, .base, .cfg, .stop, .busy, .block_count(cnt),
                .aob_sel(sel), .aob_we(we), .aob_addr(addr), .aob_wdata(wdata),
                .a2p_full, .a2p_empty);

  bridge_model #(.MEM_WORDS(8192)) bm (
    .clk, .aob_sel(sel), .aob_we(we), .aob_addr(addr), .aob_wdata(wdata),
    .aob_rdata(rdata), .imb_irq(irq), .a2p_full, .a2p_empty, .p2a_empty
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clocks between successive counter writes into host memory
  int last_t = -1, max_gap = 0, min_gap = 1 << 30, cnt_updates = 0;
  logic [31:0] last_cnt = 0;
  int t = 0;
  always @(posedge clk) begin
    t++;
    if (bm.mem[0] != last_cnt) begin
      check(bm.mem[0] == last_cnt + 1, "counter advances by one");
      last_cnt = bm.mem[0];
      cnt_updates++;
      if (last_t >= 0) begin
        if (t - last_t > max_gap) max_gap = t - last_t;
        if (t - last_t < min_gap) min_gap = t - last_t;
      end
      last_t = t;
    end
  end

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg = '{pattern: PAT_INC, seed: 32'h3000_0000, blk_len: 24'd100, cycles: 32'd5};
    base = 32'h0; start = 1;
    @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    repeat (10) @(negedge clk);
    check(bm.mem[0] == 5 && cnt == 5, $sformatf("counter %0d after 5 blocks", bm.mem[0]));
    for (int i = 0; i < 100; i++)
      check(bm.mem[1 + i] == 32'h3000_0000 + i, $sformatf("data word %0d", i));
    check(bm.mem[101] == 0, "nothing beyond the block");
    check(min_gap >= 100 && max_gap <= 112, $sformatf("block period %0d..%0d clocks for 100 words", min_gap, max_gap));
    // endless run with PCI stalls, stopped by software
    bm.mem[0] = 0; last_cnt = 0; last_t = -1;
    @(negedge clk);
    cfg = '{pattern: PAT_WALK, seed: 32'h1, blk_len: 24'd33, cycles: 32'd0};
    start = 1; @(negedge clk); start = 0;
    repeat (2000) @(negedge clk);
    stop = 1; @(negedge clk); stop = 0;
    while (busy) @(negedge clk);
    repeat (10) @(negedge clk);
    check(bm.mem[0] == cnt && cnt > 10, $sformatf("endless run counted %0d blocks", cnt));
    for (int i = 0; i < 33; i++) check(bm.mem[1 + i] == 32'h1 << (i % 32), "walking pattern");
    check(bm.errors == 0, "bridge protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
