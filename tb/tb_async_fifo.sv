// tb_async_fifo: self-checking test of the dual-clock FIFO.
//
// Writes a numbered sequence in one clock and reads it in an unrelated
// slower and then faster clock with random enables, checking order and
// completeness against a counter, that full is reached and respected and
// that empty is seen.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  always #5 wclk = ~wclk;
  int rhalf = 7;
  always #(rhalf) rclk = ~rclk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int W = 33, D = 16;
  logic         wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wdata = 0, rdata;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en, .wr_data(wdata), .wr_full(full),
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .rd_data(rdata), .rd_empty(empty)
  );

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  written = 0, got = 0, full_seen = 0, max_level = 0;
  localparam int N = 2000;
  bit  rd_go = 0;

  always @(negedge wclk) begin
    wr_en = wrst_n && (written < N) && (($urandom % 4) != 0);
    wdata = W'(written) ^ {1'b1, 32'hA5A5_0000};
    if (full) full_seen++;
  end
  always @(posedge wclk) if (wrst_n && wr_en && !full) written <= written + 1;

  always @(negedge rclk) rd_en = rd_go && (($urandom % 3) != 0);
  always @(posedge rclk) if (rd_en && !empty) begin
    check(rdata == (W'(got) ^ {1'b1, 32'hA5A5_0000}), $sformatf("word %0d", got));
    got++;
  end

  initial begin
    #1 wrst_n = 0; rrst_n = 0;
    #30 wrst_n = 1; rrst_n = 1;
    // let it fill before reading starts
    #600;
    check(full, "full with reader stopped");
    check(written == D, $sformatf("exactly %0d words accepted", written));
    rd_go = 1;
    #40000;
    rhalf = 3;
    wait (got == N);
    #200;
    check(got == N && empty, "all words read, then empty");
    check(full_seen > 0, "full seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
