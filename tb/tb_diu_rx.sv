// tb_diu_rx: self-checking test of the receiver.
//
// Sends a mix of data words, block status words (DTSTW) and other status
// words from the DIU side, then the same through the loop-back input, and
// checks that data and DTSTW come out of the data FIFO in order, that other
// status words come out of the status FIFO, that the inactive input is
// refused, and that back-pressure holds when the data FIFO fills.
module tb_diu_rx;
  import prorc_pkg::*;

  logic clk = 0, lclk = 0, rst_n = 1, lrst_n = 1;
  always #5 clk = ~clk;
  always #6 lclk = ~lclk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        loopback = 0, dvalid, dpop = 0, svalid, spop = 0, lb_active;
  link_word_t  dword, rx_word = '0, lb_word = '0;
  logic [31:0] sword;
  logic        rx_valid = 0, rx_ready, lb_valid = 0, lb_ready;

  diu_rx #(.DATA_DEPTH(16), .STATUS_DEPTH(4)) dut (
    .clk, .rst_n, .loopback,
    .data_valid(dvalid), .data_word(dword), .data_pop(dpop),
    .status_valid(svalid), .status_word(sword), .status_pop(spop),
    .link_clk(lclk), .link_rst_n(lrst_n), .lb_active,
    .rx_valid, .rx_word, .rx_ready, .lb_valid, .lb_word, .lb_ready
  );

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  link_word_t  exp_d [$];
  logic [31:0] exp_s [$];
  int nd = 0, ns = 0;
  bit reading = 0;

  always @(negedge clk) begin
    dpop = reading && dvalid && ($urandom % 2);
    spop = reading && svalid;
  end
  always @(posedge clk) begin
    if (dpop) begin
      check(exp_d.size() != 0 && dword == exp_d[0], $sformatf("data word %0d", nd));
      if (exp_d.size() != 0) void'(exp_d.pop_front());
      nd++;
    end
    if (spop) begin
      check(exp_s.size() != 0 && sword == exp_s[0], $sformatf("status word %0d", ns));
      if (exp_s.size() != 0) void'(exp_s.pop_front());
      ns++;
    end
  end

  function automatic link_word_t make(input int i);
    if (i % 13 == 12) return '{ctrl: 1'b1, data: {24'(i), DTSTW_CODE}};
    if (i % 29 == 28) return '{ctrl: 1'b1, data: {24'(i), 8'h45}};
    return '{ctrl: 1'b0, data: 32'h7000_0000 + i};
  endfunction

  task automatic feed(input bit lb, input int n);
    int i = 0;
    int stalled = 0;
    while (i < n) begin
      link_word_t w;
      @(negedge lclk);
      w = make(i);
      if (lb) begin lb_valid = 1; lb_word = w; rx_valid = 1; rx_word = '{ctrl: 1'b0, data: 32'hDEAD}; end
      else    begin rx_valid = 1; rx_word = w; lb_valid = 1; lb_word = '{ctrl: 1'b0, data: 32'hBEEF}; end
      #1;
      if (lb ? lb_ready : rx_ready) begin
        if (!w.ctrl || w.data[7:0] == DTSTW_CODE) exp_d.push_back(w); else exp_s.push_back(w.data);
        i++;
      end else stalled++;
      check(!(lb ? rx_ready : lb_ready), "inactive input refused");
      @(posedge lclk);
    end
    @(negedge lclk); rx_valid = 0; lb_valid = 0;
    if (!lb) check(stalled > 0, "back-pressure seen while reader idle");
  endtask

  initial begin
    #1 rst_n = 0; lrst_n = 0;
    #30 rst_n = 1; lrst_n = 1;
    fork
      feed(0, 150);
      begin #2000 reading = 1; end
    join
    loopback = 1;
    repeat (5) @(posedge lclk);
    check(lb_active, "loop-back active");
    feed(1, 150);
    repeat (200) @(posedge clk);
    check(exp_d.size() == 0 && exp_s.size() == 0, "all words delivered");
    check(ns == 10, $sformatf("status words %0d", ns));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
