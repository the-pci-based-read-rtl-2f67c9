// bridge_model: behavioural model of the PCI bridge as seen from the add-on
// side, with the host memory behind it. Not synthesizable; testbench only.
//
// Registers (prorc_pkg numbering): four incoming mailboxes written by the
// host (imb_irq rises when the host posts a command and falls when the
// add-on side reads IMB3), outgoing mailbox OMB0 with its "still unread"
// flag in MBEF bit 0, the add-on-to-PCI FIFO (FIFO writes) drained into host
// memory at MWAR while MWTC (bytes) lasts, and the PCI-to-add-on FIFO
// (FIFO reads) filled from host memory at MRAR while MRTC lasts. Each FIFO
// holds FIFO_DEPTH words. The PCI side moves at most one word per clock and
// is held off at random for STALL_PCT percent of the clocks, standing in for
// bus latency. Protocol misuse is counted in errors.
module bridge_model
  import prorc_pkg::*;
#(
  parameter int MEM_WORDS  = 65536,
  parameter int FIFO_DEPTH = 8,
  parameter int STALL_PCT  = 0
) (
  input  logic          clk,
  input  logic          aob_sel,
  input  logic          aob_we,
  input  aob_reg_e      aob_addr,
  input  logic [DW-1:0] aob_wdata,
  output logic [DW-1:0] aob_rdata,
  output logic          imb_irq,
  output logic          a2p_full,
  output logic          a2p_empty,
  output logic          p2a_empty
);

  logic [DW-1:0] mem [MEM_WORDS];
  logic [DW-1:0] imb [4];
  logic [DW-1:0] omb;
  logic          omb_full;
  logic [DW-1:0] a2p_q [$];
  logic [DW-1:0] p2a_q [$];
  logic [DW-1:0] mwar, mwtc, mrar, mrtc;
  int            errors, pci_writes, omb_writes;

  initial begin
    imb_irq = 1'b0;
    omb_full = 1'b0;
    omb = '0;
    mwar = '0; mwtc = '0; mrar = '0; mrtc = '0;
    errors = 0; pci_writes = 0; omb_writes = 0;
    foreach (imb[i]) imb[i] = '0;
    foreach (mem[i]) mem[i] = '0;
  end

  assign a2p_full  = (a2p_q.size() >= FIFO_DEPTH);
  assign a2p_empty = (a2p_q.size() == 0);
  assign p2a_empty = (p2a_q.size() == 0);

  always_comb begin
    aob_rdata = '0;
    unique case (aob_addr)
      REG_IMB0, REG_IMB1, REG_IMB2, REG_IMB3: aob_rdata = imb[aob_addr[1:0]];
      REG_FIFO: aob_rdata = (p2a_q.size() != 0) ? p2a_q[0] : '0;
      REG_MBEF: aob_rdata = {31'b0, omb_full};
      default: ;
    endcase
  end

  function automatic int widx(logic [DW-1:0] a);
    return int'((a >> 2) % MEM_WORDS);
  endfunction

  always @(posedge clk) begin
    // add-on side access
    if (aob_sel) begin
      if (aob_we) begin
        unique case (aob_addr)
          REG_OMB0: begin
            if (omb_full) errors++;
            omb = aob_wdata; omb_full = 1'b1; omb_writes++;
          end
          REG_FIFO: begin
            if (a2p_q.size() >= FIFO_DEPTH) errors++; else a2p_q.push_back(aob_wdata);
          end
          REG_MWAR: begin if (a2p_q.size() != 0) errors++; mwar = aob_wdata; end
          REG_MWTC: mwtc = aob_wdata;
          REG_MRAR: mrar = aob_wdata;
          REG_MRTC: mrtc = aob_wdata;
          default: ;
        endcase
      end else begin
        if (aob_addr == REG_IMB3) imb_irq = 1'b0;
        if (aob_addr == REG_FIFO) begin
          if (p2a_q.size() == 0) errors++; else void'(p2a_q.pop_front());
        end
      end
    end
    // PCI side, one word per clock each way
    if (($urandom % 100) >= STALL_PCT) begin
      if (a2p_q.size() != 0) begin
        if (mwtc < 4) errors++;
        else begin
          mem[widx(mwar)] = a2p_q.pop_front();
          mwar += 4; mwtc -= 4; pci_writes++;
        end
      end
      if (mrtc >= 4 && p2a_q.size() < FIFO_DEPTH) begin
        p2a_q.push_back(mem[widx(mrar)]);
        mrar += 4; mrtc -= 4;
      end
    end
  end

  // host side
  task automatic post_cmd(input logic [DW-1:0] w0, w1, w2, w3);
    @(negedge clk);
    while (imb_irq) @(negedge clk);
    imb[0] = w0; imb[1] = w1; imb[2] = w2; imb[3] = w3;
    imb_irq = 1'b1;
  endtask

  task automatic read_reply(output logic [DW-1:0] w, input int max_cycles);
    int n = 0;
    @(negedge clk);
    while (!omb_full && n < max_cycles) begin @(negedge clk); n++; end
    w = omb;
    omb_full = 1'b0;
  endtask

endmodule
