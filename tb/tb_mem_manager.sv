// tb_mem_manager: self-checking test of the Free FIFO and RFBA register.
//
// Pushes and pops random page entries against a reference queue kept here,
// fills the FIFO to its 128-entry depth, checks full, the dropped push and
// sticky overflow flag, the clear, and the Ready FIFO base register.
module tb_mem_manager;
  import prorc_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int DEPTH = 128;
  logic        clear = 0, push = 0, pop = 0, full, ovf, valid, rfba_wr = 0;
  free_entry_t pe, head;
  logic [7:0]  count;
  logic [31:0] rfba_in = 0, rfba;

  mem_manager #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .clear, .push, .push_entry(pe), .pop, .head, .head_valid(valid),
    .full, .overflow(ovf), .count, .rfba_wr, .rfba_in, .rfba
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  free_entry_t ref_q [$];

  function automatic free_entry_t rnd_entry();
    return '{ba: $urandom, bl: BL_W'($urandom), idx: IDX_W'($urandom)};
  endfunction

  task automatic step(input bit do_push, input bit do_pop);
    @(negedge clk);
    push = do_push; pop = do_pop && valid; pe = rnd_entry();
    if (pop) check(head == ref_q[0], "head entry");
    @(posedge clk); #1;
    if (pop) void'(ref_q.pop_front());
    if (push && ref_q.size() < DEPTH + (pop ? 1 : 0)) ref_q.push_back(pe);
    push = 0; pop = 0;
    check(count == 8'(ref_q.size()), $sformatf("count %0d vs %0d", count, ref_q.size()));
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!valid && !full && !ovf, "empty after reset");
    for (int i = 0; i < 300; i++) step(1'($urandom), 1'($urandom));
    while (ref_q.size() < DEPTH) step(1, 0);
    check(full, "full at 128 entries");
    check(!ovf, "no overflow yet");
    step(1, 0);
    check(ovf && count == DEPTH, "push into full FIFO dropped, overflow set");
    for (int i = 0; i < 40; i++) step(0, 1);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    ref_q.delete();
    check(!valid && !ovf && count == 0, "clear empties FIFO");
    @(negedge clk); rfba_wr = 1; rfba_in = 32'h1234_5678; @(negedge clk); rfba_wr = 0;
    check(rfba == 32'h1234_5678, "RFBA register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
