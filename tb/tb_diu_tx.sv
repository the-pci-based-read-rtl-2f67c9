// tb_diu_tx: self-checking test of the transmitter.
//
// Sends read-DMA words, then pattern-generator words (with a control word),
// through the transmit FIFO into the link clock with random link
// back-pressure, and loads link commands into the command register while
// data flows. Checks that data leaves in order, that the source not
// selected is refused, that every command leaves once as a control word and
// that the command register is busy until it has been sent.
module tb_diu_tx;
  import prorc_pkg::*;

  logic clk = 0, lclk = 0, rst_n = 1, lrst_n = 1;
  always #5 clk = ~clk;
  always #4 lclk = ~lclk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic          sel_pg = 0, rdma_valid = 0, rdma_ready, pg_valid = 0, pg_ready;
  logic [31:0]   rdma_data = 0;
  link_word_t    pg_word = '0;
  logic          cmd_wr = 0, cmd_busy;
  logic [31:0]   cmd_data = 0;
  logic          tx_valid, tx_ready = 0;
  link_word_t    tx_word;

  diu_tx #(.DEPTH(16)) dut (
    .clk, .rst_n, .sel_pg, .rdma_valid, .rdma_data, .rdma_ready,
    .pg_valid, .pg_word, .pg_ready, .cmd_wr, .cmd_data, .cmd_busy,
    .link_clk(lclk), .link_rst_n(lrst_n), .tx_valid, .tx_word, .tx_ready
  );

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // link side receiver
  link_word_t exp_data [$];
  logic [31:0] exp_cmd [$];
  int cmds_out = 0, data_out = 0;
  always @(negedge lclk) tx_ready = ($urandom % 3) != 0;
  always @(posedge lclk) if (lrst_n && tx_valid && tx_ready) begin
    if (tx_word.ctrl && exp_cmd.size() != 0 && tx_word.data == exp_cmd[0]) begin
      void'(exp_cmd.pop_front()); cmds_out++;
    end else begin
      check(exp_data.size() != 0 && tx_word == exp_data[0],
            $sformatf("data word %0d = %h", data_out, tx_word.data));
      if (exp_data.size() != 0) void'(exp_data.pop_front());
      data_out++;
    end
  end

  task automatic send_rdma(input int n);
    int i = 0;
    while (i < n) begin
      @(negedge clk);
      rdma_valid = 0;
      if (rdma_ready && ($urandom % 2)) begin
        rdma_valid = 1; rdma_data = 32'h1000_0000 + i;
        exp_data.push_back('{ctrl: 1'b0, data: rdma_data});
        i++;
      end
    end
    @(negedge clk); rdma_valid = 0;
  endtask

  task automatic send_pg(input int n);
    int i = 0;
    while (i < n) begin
      @(negedge clk);
      pg_valid = 1;
      pg_word = (i == n - 1) ? '{ctrl: 1'b1, data: {24'(n - 1), DTSTW_CODE}}
                             : '{ctrl: 1'b0, data: 32'h2000_0000 + i};
      #1;
      if (pg_ready) begin exp_data.push_back(pg_word); i++; end
      @(posedge clk);
    end
    @(negedge clk); pg_valid = 0;
  endtask

  task automatic send_cmd(input logic [31:0] c);
    @(negedge clk);
    while (cmd_busy) @(negedge clk);
    cmd_wr = 1; cmd_data = c; exp_cmd.push_back(c);
    @(negedge clk); cmd_wr = 0;
    check(cmd_busy, "command register busy after load");
  endtask

  initial begin
    #1 rst_n = 0; lrst_n = 0;
    #30 rst_n = 1; lrst_n = 1;
    fork
      send_rdma(100);
      begin repeat (20) @(posedge clk); send_cmd(32'hC0DE_0001); send_cmd(32'hC0DE_0002); end
    join
    @(negedge clk);
    check(!pg_ready, "generator refused while read DMA selected");
    sel_pg = 1;
    @(negedge clk);
    check(!rdma_ready, "read DMA refused while generator selected");
    fork
      send_pg(60);
      begin repeat (10) @(posedge clk); send_cmd(32'hC0DE_0003); end
    join
    repeat (300) @(posedge clk);
    check(exp_data.size() == 0 && data_out == 160, $sformatf("all data sent (%0d)", data_out));
    check(exp_cmd.size() == 0 && cmds_out == 3, "all commands sent");
    check(!cmd_busy, "command register free");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
