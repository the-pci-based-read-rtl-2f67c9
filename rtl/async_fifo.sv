// async_fifo: dual-clock FIFO with Gray-coded pointers.
//
// The receiver and transmitter FIFOs of the DIU interface separate the link
// clock from the add-on (PCI) clock and even out the data rates of the two
// sides. Each side keeps a binary pointer one bit wider than the address and
// passes its Gray-coded copy to the other side through a two-flop
// synchroniser; full and empty are computed from the local pointer and the
// synchronised remote one, so they are pessimistic by the synchroniser delay
// but never wrong. The read side is first-word fall-through: rd_data shows
// the oldest word whenever rd_empty is low, and rd_en removes it.
// wr_en while wr_full, or rd_en while rd_empty, is ignored.
// DEPTH must be a power of two. The use of FIFOs to cross clock domains is
// the document's; their depth and this construction are this design's.
module async_fifo #(
  parameter int WIDTH = 33,
  parameter int DEPTH = 256
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_s1, wgray_s2;      // write pointer in the read domain
  logic [AW:0] rgray_s1, rgray_s2;      // read pointer in the write domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  logic [AW:0] wbin_nx;
  assign wbin_nx = wbin + (AW+1)'(wr_en && !wr_full);
  assign wr_full = (wgray == {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
    end
  end

  // read side
  logic [AW:0] rbin_nx;
  assign rbin_nx  = rbin + (AW+1)'(rd_en && !rd_empty);
  assign rd_empty = (rgray == wgray_s2);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
    end
  end

endmodule
