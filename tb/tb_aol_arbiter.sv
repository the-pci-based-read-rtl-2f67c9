// tb_aol_arbiter: self-checking test of the add-on bus manager.
//
// Drives random request patterns on the three ports and checks, against a
// priority encoder written here, that exactly the highest-priority request
// is granted and that its access is the one placed on the bus.
module tb_aol_arbiter;
  import prorc_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  aob_req_t      req [N_MASTERS];
  logic [2:0]    gnt;
  logic          sel, we;
  aob_reg_e      addr;
  logic [31:0]   wdata;

  aol_arbiter dut (.clk, .rst_n, .req, .gnt, .aob_sel(sel), .aob_we(we), .aob_addr(addr),
                   .aob_wdata(wdata));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int wins [3] = '{0, 0, 0};
  initial begin
    for (int i = 0; i < N_MASTERS; i++) req[i] = '0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      // keep the request of any port that was not granted, as the rule requires
      for (int i = 0; i < N_MASTERS; i++)
        if (!req[i].req || gnt[i])
          req[i] = '{req: 1'($urandom), we: 1'($urandom), addr: aob_reg_e'($urandom % 14),
                     wdata: $urandom};
      #1;
      begin
        int w;
        w = -1;
        for (int i = N_MASTERS - 1; i >= 0; i--) if (req[i].req) w = i;
        if (w < 0) check(gnt == 0 && !sel, "no request, no grant");
        else begin
          check(gnt == 3'(1 << w), $sformatf("grant %b for winner %0d req %b%b%b", gnt, w, req[2].req, req[1].req, req[0].req));
          check(sel && we == req[w].we && addr == req[w].addr && wdata == req[w].wdata,
                "bus carries winner's access");
          wins[w]++;
        end
      end
    end
    check(wins[0] > 0 && wins[1] > 0 && wins[2] > 0, "every port won at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
