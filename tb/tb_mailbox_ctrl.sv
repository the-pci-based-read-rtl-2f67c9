// tb_mailbox_ctrl: self-checking test of the mailbox controller.
//
// A bridge model plays the host: it posts commands into IMB0..IMB3 and
// reads replies from OMB0. Checks that the four words arrive as one command
// in the right order, that a reply is not written while the host has left
// the previous one unread (the block must poll the mailbox status instead),
// and that commands are still fetched while a reply waits.
module tb_mailbox_ctrl;
  import prorc_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  aob_req_t    bus_req;
  logic        bus_gnt, irq, a2p_full, a2p_empty, p2a_empty;
  logic [31:0] rdata;
  logic        cmd_valid, cmd_ready = 0, resp_valid = 0, resp_done;
  mbox_cmd_t   cmd;
  logic [31:0] resp_data = 0;

  assign bus_gnt = bus_req.req;

  mailbox_ctrl dut (
    .clk, .rst_n, .imb_irq(irq),
    .bus_req, .bus_gnt, .bus_rdata(rdata),
    .cmd_valid, .cmd, .cmd_ready,
    .resp_valid, .resp_data, .resp_done
  );

  bridge_model #(.MEM_WORDS(16)) bm (
    .clk, .aob_sel(bus_gnt), .aob_we(bus_req.we), .aob_addr(bus_req.addr),
    .aob_wdata(bus_req.wdata), .aob_rdata(rdata), .imb_irq(irq),
    .a2p_full, .a2p_empty, .p2a_empty
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic take_cmd(input logic [31:0] w0, w1, w2, w3);
    int n = 0;
    @(negedge clk);
    while (!cmd_valid && n < 100) begin @(negedge clk); n++; end
    check(cmd_valid, "command arrives");
    check(cmd.imb0 == w0 && cmd.imb1 == w1 && cmd.imb2 == w2 && cmd.imb3 == w3, "command words");
    cmd_ready = 1;
    @(negedge clk);
    cmd_ready = 0;
    check(!cmd_valid, "command taken");
  endtask

  task automatic send_reply(input logic [31:0] w);
    resp_data = w; resp_valid = 1;
    @(posedge clk);
    while (!resp_done) @(posedge clk);
    @(negedge clk);
    resp_valid = 0;
  endtask

  logic [31:0] r;
  int polls = 0;
  always @(posedge clk) if (bus_gnt && bus_req.addr == REG_MBEF) polls++;

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    bm.post_cmd(32'h11, 32'h22, 32'h33, 32'h0000_000A);
    take_cmd(32'h11, 32'h22, 32'h33, 32'h0000_000A);
    check(!irq, "interrupt cleared by IMB3 read");
    send_reply(32'hCAFE_0001);
    check(bm.omb_full && bm.omb == 32'hCAFE_0001, "reply in OMB0");
    // second reply while the first is unread: must wait
    fork send_reply(32'hCAFE_0002); join_none
    repeat (40) @(posedge clk);
    check(bm.omb == 32'hCAFE_0001 && bm.omb_writes == 1, "unread reply not overwritten");
    check(polls > 2, "mailbox status polled");
    // a new command is still fetched while the reply waits
    bm.post_cmd(32'hA, 32'hB, 32'hC, 32'h8000_0000);
    take_cmd(32'hA, 32'hB, 32'hC, 32'h8000_0000);
    bm.read_reply(r, 100);
    check(r == 32'hCAFE_0001, "host reads first reply");
    repeat (20) @(posedge clk);
    bm.read_reply(r, 100);
    check(r == 32'hCAFE_0002, "host reads second reply");
    check(bm.errors == 0, "bridge protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
