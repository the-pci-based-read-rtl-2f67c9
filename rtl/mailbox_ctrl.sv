// mailbox_ctrl: mailbox handling of the add-on logic.
//
// Commands arrive from the host in the four 32-bit incoming mailboxes of the
// PCI bridge. The bridge raises imb_irq when the predefined byte (here the
// top byte of IMB3) has been written; the host therefore writes its
// parameters into IMB0..IMB2 first and the command word into IMB3 last. On
// imb_irq this block reads IMB0, IMB1, IMB2 and IMB3 in that order over the
// add-on bus (the IMB3 read clears the interrupt in the bridge) and offers
// the four words as one command (cmd_valid/cmd_ready handshake).
//
// Replies go the other way through the outgoing mailbox OMB0. The card never
// replies unrequested, and it must not overwrite a reply the host has not yet
// read: before writing OMB0 the block reads the bridge's mailbox status
// register (MBEF bit 0 = OMB0 still full) and writes only when it is clear,
// otherwise it polls again, letting new commands be read in between.
// resp_done pulses for one cycle when the reply has been written.
// Reading the mailboxes on the interrupt and guarding the outgoing mailbox
// follow the document; the read order, the single reply word and the status
// polling are this design's choices.
module mailbox_ctrl
  import prorc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          imb_irq,
  // add-on bus
  output aob_req_t      bus_req,
  input  logic          bus_gnt,
  input  logic [DW-1:0] bus_rdata,
  // command out
  output logic          cmd_valid,
  output mbox_cmd_t     cmd,
  input  logic          cmd_ready,
  // reply in
  input  logic          resp_valid,
  input  logic [DW-1:0] resp_data,
  output logic          resp_done
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_POLL, S_WRITE} state_e;
  state_e     state;
  logic [1:0] idx;

  always_comb begin
    bus_req = '{req: 1'b0, we: 1'b0, addr: REG_IMB0, wdata: '0};
    unique case (state)
      S_READ:  bus_req = '{req: 1'b1, we: 1'b0, addr: aob_reg_e'({2'b00, idx}), wdata: '0};
      S_POLL:  bus_req = '{req: 1'b1, we: 1'b0, addr: REG_MBEF, wdata: '0};
      S_WRITE: bus_req = '{req: 1'b1, we: 1'b1, addr: REG_OMB0, wdata: resp_data};
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx       <= '0;
      cmd_valid <= 1'b0;
      cmd       <= '0;
      resp_done <= 1'b0;
    end else begin
      resp_done <= 1'b0;
      if (cmd_valid && cmd_ready) cmd_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (imb_irq && !cmd_valid) begin
            state <= S_READ;
            idx   <= '0;
          end else if (resp_valid && !resp_done) begin
            state <= S_POLL;
          end
        end
        S_READ: if (bus_gnt) begin
          unique case (idx)
            2'd0: cmd.imb0 <= bus_rdata;
            2'd1: cmd.imb1 <= bus_rdata;
            2'd2: cmd.imb2 <= bus_rdata;
            default: cmd.imb3 <= bus_rdata;
          endcase
          idx <= idx + 2'd1;
          if (idx == 2'd3) begin
            cmd_valid <= 1'b1;
            state     <= S_IDLE;
          end
        end
        S_POLL: if (bus_gnt) state <= bus_rdata[0] ? S_IDLE : S_WRITE;
        S_WRITE: if (bus_gnt) begin
          resp_done <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
