// aol_arbiter: bus manager of the add-on local bus.
//
// Several firmware parts share the one 32-bit add-on bus of the PCI bridge.
// Each part raises a request carrying a complete single-word access
// (address, direction, write data). The manager grants one request per
// clock with a fixed priority, port 0 highest: the mailbox (command)
// transfers come first, so the card can always be controlled, even while a
// DMA runs; then write DMA, then read DMA. The granted access is put on the
// bus in the same cycle and completes at the next rising edge; read data
// from the bridge is returned to every part and taken by the granted one.
// The priority scheme and the request/grant signals follow the document; the
// order of the two DMA engines and the single-cycle access are this design's
// choices. A requester may withdraw a waiting request but must not change it.
module aol_arbiter
  import prorc_pkg::*;
#(
  parameter int N = N_MASTERS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  aob_req_t        req   [N],
  output logic [N-1:0]    gnt,
  // add-on bus towards the bridge
  output logic            aob_sel,
  output logic            aob_we,
  output aob_reg_e        aob_addr,
  output logic [DW-1:0]   aob_wdata
);

  always_comb begin
    gnt       = '0;
    aob_sel   = 1'b0;
    aob_we    = 1'b0;
    aob_addr  = REG_IMB0;
    aob_wdata = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i].req) begin
        gnt       = '0;
        gnt[i]    = 1'b1;
        aob_sel   = 1'b1;
        aob_we    = req[i].we;
        aob_addr  = req[i].addr;
        aob_wdata = req[i].wdata;
      end
    end
  end

  // A waiting request may be withdrawn, but must not change before its grant.
  for (genvar g = 0; g < N; g++) begin : g_chk
    a_req_held : assert property (@(posedge clk) disable iff (!rst_n)
      req[g].req && !gnt[g] |=> !req[g].req || $stable(req[g]));
  end
  a_one_grant : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
