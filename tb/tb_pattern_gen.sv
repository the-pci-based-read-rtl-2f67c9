// tb_pattern_gen: self-checking test of the test pattern generator.
//
// Runs each pattern with a given block length and cycle count, with random
// back-pressure, and compares every word with a reference sequence computed
// here; each block must end with its status word. Also checks the endless
// mode (cycle count 0) and stop.
module tb_pattern_gen;
  import prorc_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic       start = 0, stop = 0, busy, valid, ready = 0;
  pg_cfg_t    cfg;
  link_word_t word;
  logic [31:0] blocks;

  pattern_gen dut (.clk, .rst_n, .start, .cfg, .stop, .busy, .valid, .word, .ready,
                   .blocks_sent(blocks));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_word(pattern_e p, logic [31:0] s, int i);
    unique case (p)
      PAT_INC:  return s + 32'(i);
      PAT_DEC:  return s - 32'(i);
      PAT_WALK: return (s << (i % 32)) | (s >> ((32 - i % 32) % 32));
      PAT_ALT:  return (i % 2) ? ~s : s;
      default:  return s;
    endcase
  endfunction

  task automatic run(input pattern_e p, input logic [31:0] seed, input int len, input int cyc);
    int b, i, n;
    cfg = '{pattern: p, seed: seed, blk_len: BL_W'(len), cycles: 32'(cyc)};
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    b = 0; i = 0; n = 0;
    while (busy && n < 20000) begin
      ready = ($urandom % 4) != 0;
      #1;
      if (valid && ready) begin
        if (i == len) begin
          check(word.ctrl && word.data == {24'(len), DTSTW_CODE}, "status word ends block");
          i = 0; b++;
        end else begin
          check(!word.ctrl && word.data == ref_word(p, seed, i),
                $sformatf("pattern %0d word %0d = %h", p, i, word.data));
          i++;
        end
      end
      @(negedge clk); n++;
    end
    ready = 0;
    check(b == cyc, $sformatf("%0d blocks of %0d", b, cyc));
    check(blocks == 32'(cyc), "blocks_sent");
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(PAT_INC,   32'hFFFF_FFFE, 7, 3);
    run(PAT_DEC,   32'h0000_0002, 5, 2);
    run(PAT_WALK,  32'h0000_0001, 40, 1);
    run(PAT_ALT,   32'hAAAA_AAAA, 4, 2);
    run(PAT_CONST, 32'h1234_5678, 1, 4);
    // endless until stop
    cfg = '{pattern: PAT_INC, seed: 0, blk_len: 3, cycles: 0};
    @(negedge clk); start = 1; @(negedge clk); start = 0; ready = 1;
    repeat (200) @(negedge clk);
    check(busy && blocks == 50, $sformatf("endless mode running, %0d blocks", blocks));
    stop = 1; @(negedge clk); stop = 0;
    check(!busy && !valid, "stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
