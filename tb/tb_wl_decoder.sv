// Testbench for wl_decoder: every address with enable high and low.
`include "tb/tb_check.svh"
module tb_wl_decoder;
  localparam int unsigned N = 32;
  int checks = 0, failures = 0;
  logic [4:0] addr;
  logic en;
  logic [N-1:0] wl;
  wl_decoder #(.N_WORDS(N)) dut (.*);
  initial begin
    for (int a = 0; a < N; a++) begin
      for (int e = 0; e < 2; e++) begin
        addr = 5'(a); en = e[0];
        #1;
        `CHECK(wl == (e ? (N'(1) << a) : '0), $sformatf("addr %0d en %0d", a, e))
      end
    end
    `TB_DONE
  end
  initial begin
    #10000; failures++; $display("watchdog expired"); `TB_DONE
  end
endmodule
