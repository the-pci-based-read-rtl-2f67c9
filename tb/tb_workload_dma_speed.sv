// tb_workload_dma_speed: DMA speed against block size with the
// performance-test firmware.
//
// Runs perf_dma for block sizes from 40 bytes to 6 MB (10 to 1,572,864
// words), each block written to the same host buffer followed by the block
// counter, and works out the rate from the clocks between counter updates
// at a 33 MHz add-on clock. The PCI side of the bridge model is ideal (no
// stalls), so the figures are the upper bound the firmware allows. Checks:
// counter value, first and last data word of the last block, and that the
// number of clocks per block lies between n and n + 14 (one word per clock
// plus the fixed per-block cost).
module tb_workload_dma_speed;
  import prorc_pkg::*;

  logic clk = 0, rst_n = 1;
  always #15 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int MAXW = 1572864 + 2;
  logic          start = 0, stop = 0, busy, sel, we, a2p_full, a2p_empty, p2a_empty, irq;
  logic [31:0]   cnt, wdata, rdata;
  aob_reg_e      addr;
  pg_cfg_t       cfg = '0;

  perf_dma dut (.clk, .rst_n, .start, .base(32'h0), .cfg, .stop, .busy, .block_count(cnt),
                .aob_sel(sel), .aob_we(we), .aob_addr(addr), .aob_wdata(wdata),
                .a2p_full, .a2p_empty);

  bridge_model #(.MEM_WORDS(MAXW)) bm (
    .clk, .aob_sel(sel), .aob_we(we), .aob_addr(addr), .aob_wdata(wdata),
    .aob_rdata(rdata), .imb_irq(irq), .a2p_full, .a2p_empty, .p2a_empty
  );

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t = 0;
  always @(posedge clk) t++;

  task automatic measure(input int words, input int blocks);
    longint t0, t1;
    real mbs;
    bm.mem[0] = 0;
    @(negedge clk);
    cfg = '{pattern: PAT_INC, seed: 32'(words) << 8, blk_len: BL_W'(words), cycles: 32'(blocks)};
    start = 1; @(negedge clk); start = 0;
    // rate from the first to the last counter update
    while (bm.mem[0] == 0) @(negedge clk);
    t0 = t;
    while (bm.mem[0] != 32'(blocks)) @(negedge clk);
    t1 = t;
    while (busy) @(negedge clk);
    repeat (5) @(negedge clk);
    check(bm.mem[0] == 32'(blocks) && cnt == 32'(blocks), $sformatf("%0d words: counter %0d", words, bm.mem[0]));
    check(bm.mem[1] == (32'(words) << 8) && bm.mem[words] == (32'(words) << 8) + 32'(words - 1),
          $sformatf("%0d words: block data", words));
    if (blocks > 1) begin
      real per = real'(t1 - t0) / real'(blocks - 1);
      mbs = 4.0 * words / (per * 30.0e-9) / 1.0e6;
      check(per >= words && per <= words + 14, $sformatf("%0d words: %0.1f clocks per block", words, per));
      $display("block %8d bytes: %6.1f clocks/block, %6.1f MB/s at a 30 ns clock", 4 * words, per, mbs);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(10, 20);        // 40 B
    measure(100, 10);       // 400 B
    measure(1000, 5);       // 4 KB
    measure(10000, 3);      // 40 KB
    measure(102400, 3);     // 400 KB
    measure(524288, 2);     // 2 MB
    measure(1572864, 2);    // 6 MB
    check(bm.errors == 0, "bridge protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
