// tb_rdma: self-checking test of the read DMA.
//
// Fills host memory in a bridge model, starts a read of N words and checks
// the register programming (MRAR, MRTC in bytes), that every word reaches
// the transmit side in order, that back-pressure from a full transmit FIFO
// is obeyed and that the engine goes idle after the last word. Without
// back-pressure the words must arrive one per clock.
module tb_rdma;
  import prorc_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic            start = 0, stop = 0, busy;
  logic [31:0]     addr = 0;
  logic [BL_W-1:0] len = 0;
  aob_req_t        bus_req;
  logic            bus_gnt, a2p_full, a2p_empty, p2a_empty, irq;
  logic [31:0]     rdata, tx_data;
  logic            tx_valid, tx_ready = 1;

  assign bus_gnt = bus_req.req;

  rdma dut (
    .clk, .rst_n, .start, .addr, .len, .stop, .busy,
    .bus_req, .bus_gnt, .bus_rdata(rdata), .p2a_empty,
    .tx_valid, .tx_data, .tx_ready
  );

  bridge_model #(.MEM_WORDS(4096)) bm (
    .clk, .aob_sel(bus_gnt), .aob_we(bus_req.we), .aob_addr(bus_req.addr),
    .aob_wdata(bus_req.wdata), .aob_rdata(rdata), .imb_irq(irq),
    .a2p_full, .a2p_empty, .p2a_empty
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int          got = 0, first_t = 0, last_t = 0;
  logic [31:0] expect_base;
  always @(posedge clk) if (tx_valid) begin
    if (!tx_ready) begin failures++; $display("FAIL: push while not ready"); end
    check(tx_data == expect_base + got, $sformatf("word %0d = %h", got, tx_data));
    if (got == 0) first_t = int'($time);
    last_t = int'($time);
    got++;
  end

  logic [31:0] mrtc_seen = 0;
  always @(posedge clk) if (bus_gnt && bus_req.we && bus_req.addr == REG_MRTC) mrtc_seen = bus_req.wdata;

  task automatic run(input logic [31:0] a, input int n, input bit throttle);
    got = 0;
    expect_base = 32'h5000_0000 + (a >> 2);
    @(negedge clk); addr = a; len = BL_W'(n); start = 1;
    @(negedge clk); start = 0;
    while (busy) begin
      @(negedge clk);
      if (throttle) tx_ready = ($urandom % 3) != 0;
    end
    tx_ready = 1;
    repeat (3) @(posedge clk);
    check(got == n, $sformatf("received %0d of %0d", got, n));
    check(mrtc_seen == 4 * n, "MRTC byte count");
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 4096; i++) bm.mem[i] = 32'h5000_0000 + i;
    rst_n = 1;
    run(32'h0000_0400, 64, 0);
    check((last_t - first_t) / 10 == 63, $sformatf("64 words in %0d clocks", (last_t - first_t) / 10 + 1));
    run(32'h0000_1000, 300, 1);
    run(32'h0000_0010, 1, 0);
    check(!busy, "idle at end");
    check(bm.errors == 0, "bridge protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
