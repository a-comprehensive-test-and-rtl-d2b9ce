// Testbench for mmr_node: all 2**16 request patterns with the node enabled
// and a sample disabled; grant, match found and MMD are checked against a
// scan for the lowest set input and a population count.
`include "tb/tb_check.svh"
module tb_mmr_node;
  localparam int unsigned P = 16;
  int checks = 0, failures = 0;
  logic [P-1:0] req, grant;
  logic en, match_found, mmd;
  mmr_node #(.P(P)) dut (.*);
  initial begin
    for (int v = 0; v < (1 << P); v++) begin
      int first, cnt;
      logic [P-1:0] exp;
      req = P'(v);
      en = 1'b1;
      first = -1; cnt = 0;
      for (int i = P - 1; i >= 0; i--) if (req[i]) begin first = i; cnt++; end
      exp = (first >= 0) ? (P'(1) << first) : '0;
      #1;
      `CHECK(grant == exp, $sformatf("grant req=%h", req))
      `CHECK(match_found == (cnt > 0), $sformatf("mf req=%h", req))
      `CHECK(mmd == (cnt > 1), $sformatf("mmd req=%h", req))
      if (v % 97 == 0) begin
        en = 1'b0;
        #1;
        `CHECK(grant == '0, $sformatf("disabled req=%h", req))
        `CHECK(match_found == (cnt > 0), $sformatf("disabled mf req=%h", req))
      end
    end
    `TB_DONE
  end
  initial begin
    #10000000; failures++; $display("watchdog expired"); `TB_DONE
  end
endmodule
