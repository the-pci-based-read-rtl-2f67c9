// pattern_gen: test pattern generator of the DIU interface.
//
// Produces data blocks for the transmit path, for self-test in loop-back or
// to exercise the link. A start pulse loads the configuration: the word
// sequence (incrementing, decrementing, walking, alternating or constant,
// each starting from a seed at the beginning of every block), the block
// length in words and the number of blocks; a count of 0 repeats forever
// until stop. After the last data word of every block the generator sends
// one control word, the block status word (DTSTW code in the low byte, block
// length above it), so that the receiving side sees where each block ends.
// Output is a valid/ready stream of link words; one word per clock while
// ready is high. busy is high from start until the last block's status word
// has been taken, or until stop.
// Selectable block length, pattern and cycle count (including infinite) are
// from the document; the pattern set and the trailing status word are this
// design's choices.
module pattern_gen
  import prorc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  pg_cfg_t    cfg,
  input  logic       stop,
  output logic       busy,
  output logic       valid,
  output link_word_t word,
  input  logic       ready,
  output logic [DW-1:0] blocks_sent
);

  pg_cfg_t         c;
  logic [DW-1:0]   value;
  logic [BL_W-1:0] widx;               // words of this block already sent
  logic [DW-1:0]   blk_left;           // blocks still to send (when c.cycles != 0)
  logic            in_status;          // sending the closing status word

  function automatic logic [DW-1:0] next_value(pattern_e p, logic [DW-1:0] v);
    unique case (p)
      PAT_INC:  return v + 1'b1;
      PAT_DEC:  return v - 1'b1;
      PAT_WALK: return {v[DW-2:0], v[DW-1]};
      PAT_ALT:  return ~v;
      default:  return v;
    endcase
  endfunction

  assign valid = busy;
  assign word  = in_status ? '{ctrl: 1'b1, data: {c.blk_len, DTSTW_CODE}}
                           : '{ctrl: 1'b0, data: value};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      c           <= '0;
      value       <= '0;
      widx        <= '0;
      blk_left    <= '0;
      in_status   <= 1'b0;
      blocks_sent <= '0;
    end else if (stop) begin
      busy      <= 1'b0;
      in_status <= 1'b0;
    end else if (start) begin
      busy        <= (cfg.blk_len != 0);
      c           <= cfg;
      value       <= cfg.seed;
      widx        <= '0;
      blk_left    <= cfg.cycles;
      in_status   <= 1'b0;
      blocks_sent <= '0;
    end else if (busy && ready) begin
      if (in_status) begin
        in_status   <= 1'b0;
        value       <= c.seed;
        widx        <= '0;
        blocks_sent <= blocks_sent + 1'b1;
        if (c.cycles != 0) begin
          blk_left <= blk_left - 1'b1;
          if (blk_left == 1) busy <= 1'b0;
        end
      end else begin
        value <= next_value(c.pattern, value);
        widx  <= widx + 1'b1;
        if (widx == c.blk_len - 1'b1) in_status <= 1'b1;
      end
    end
  end

endmodule
