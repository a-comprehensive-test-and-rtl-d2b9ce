// Testbench for scan_chain_b: parallel capture (Mux-2 position a), serial
// shift (position b) checked bit by bit at scan_out, hold when disabled and
// the one-cycle clear.
`include "tb/tb_check.svh"
module tb_scan_chain_b;
  localparam int unsigned N = 16, P = 4, T = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, mux2 = 0, scan_in = 0, scan_out;
  logic [T-1:0] d = '0, q, model;
  scan_chain_b #(.N_WORDS(N), .P(P)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    model = '0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      clr = ($urandom % 100 == 0);
      en = ($urandom % 5 != 0);
      mux2 = ($urandom % 6 != 0);
      scan_in = $urandom;
      d = T'($urandom);
      `CHECK(scan_out == model[T-1], $sformatf("scan_out cycle %0d", t))
      @(posedge clk);
      if (clr) model = '0;
      else if (en) model = mux2 ? {model[T-2:0], scan_in} : d;
      #1;
      `CHECK(q == model, $sformatf("cycle %0d", t))
    end
    `TB_DONE
  end
  initial begin
    #100000; failures++; $display("watchdog expired"); `TB_DONE
  end
endmodule
