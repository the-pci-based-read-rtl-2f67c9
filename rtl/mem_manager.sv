// mem_manager: Free FIFO and Ready FIFO base address of the scattered
// memory model.
//
// The host software keeps a list of free pages in its memory and hands them
// to the card one by one. Each page becomes one Free FIFO entry of three
// fields: base address (BA), block length (BL, in 32-bit words here) and the
// index (IDX) of the Ready FIFO entry in host memory where the card reports
// the page once it is closed. The Free FIFO holds DEPTH entries (128 in the
// document). The Ready FIFO base address (RFBA) register sits here too; the
// write DMA adds IDX*8 to it, because each Ready FIFO entry is two words.
//
// Interface: push/push_entry write an entry (a push into a full FIFO is
// dropped and sets the sticky overflow flag); the head entry is always
// visible on head/head_valid (first-word fall-through) and pop removes it.
// clear empties the FIFO and clears the overflow flag. All in one clock.
// The entry fields and the depth come from the document; the field widths,
// the overflow flag and the clear are this design's choices.
module mem_manager
  import prorc_pkg::*;
#(
  parameter int DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     push,
  input  free_entry_t              push_entry,
  input  logic                     pop,
  output free_entry_t              head,
  output logic                     head_valid,
  output logic                     full,
  output logic                     overflow,
  output logic [$clog2(DEPTH):0]   count,
  input  logic                     rfba_wr,
  input  logic [DW-1:0]            rfba_in,
  output logic [DW-1:0]            rfba
);

  localparam int AW = $clog2(DEPTH);

  free_entry_t   mem [DEPTH];
  logic [AW-1:0] wp, rp;

  assign head_valid = (count != 0);
  assign full       = (count == DEPTH[AW:0]);
  assign head       = mem[rp];

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && head_valid;

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= push_entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
      rfba     <= '0;
    end else begin
      if (rfba_wr) rfba <= rfba_in;
      if (clear) begin
        wp       <= '0;
        rp       <= '0;
        count    <= '0;
        overflow <= 1'b0;
      end else begin
        if (push && full) overflow <= 1'b1;
        if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
        if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
        count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
      end
    end
  end

  a_no_pop_empty : assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
