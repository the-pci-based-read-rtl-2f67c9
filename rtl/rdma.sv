// rdma: read DMA controller.
//
// Moves a buffer from host memory to the link. A start pulse gives the host
// address and the length in 32-bit words. The engine programs the bridge's
// master read address and byte-count registers (MRAR, MRTC) over the add-on
// bus; the bridge then fetches the data over PCI into its PCI-to-add-on
// FIFO. The engine reads that FIFO one word per granted bus cycle, whenever
// the FIFO holds data (p2a_empty low) and the transmit FIFO has room
// (tx_ready), and hands each word on at once (tx_valid for one cycle, data
// straight from the bus). busy falls after the last word; stop abandons the
// transfer. Throughput is one word per clock when nothing stalls.
// The use of the bridge's read register set and FIFO follows the document;
// the register protocol and the stall rules are this design's.
module rdma
  import prorc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [DW-1:0]   addr,
  input  logic [BL_W-1:0] len,
  input  logic            stop,
  output logic            busy,
  // add-on bus
  output aob_req_t        bus_req,
  input  logic            bus_gnt,
  input  logic [DW-1:0]   bus_rdata,
  input  logic            p2a_empty,
  // to the transmit FIFO
  output logic            tx_valid,
  output logic [DW-1:0]   tx_data,
  input  logic            tx_ready
);

  typedef enum logic [1:0] {S_IDLE, S_MRAR, S_MRTC, S_XFER} state_e;
  state_e          state;
  logic [DW-1:0]   a;
  logic [BL_W-1:0] left;

  assign busy = (state != S_IDLE);

  always_comb begin
    bus_req = '{req: 1'b0, we: 1'b0, addr: REG_FIFO, wdata: '0};
    unique case (state)
      S_MRAR: bus_req = '{req: 1'b1, we: 1'b1, addr: REG_MRAR, wdata: a};
      S_MRTC: bus_req = '{req: 1'b1, we: 1'b1, addr: REG_MRTC, wdata: DW'({left, 2'b00})};
      S_XFER: bus_req = '{req: !p2a_empty && tx_ready, we: 1'b0, addr: REG_FIFO, wdata: '0};
      default: ;
    endcase
  end

  assign tx_valid = (state == S_XFER) && bus_gnt;
  assign tx_data  = bus_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a     <= '0;
      left  <= '0;
    end else if (stop) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: if (start && len != 0) begin
          a     <= addr;
          left  <= len;
          state <= S_MRAR;
        end
        S_MRAR: if (bus_gnt) state <= S_MRTC;
        S_MRTC: if (bus_gnt) state <= S_XFER;
        S_XFER: if (bus_gnt) begin
          left <= left - 1'b1;
          if (left == 1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
