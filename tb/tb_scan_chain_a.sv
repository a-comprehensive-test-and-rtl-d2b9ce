// Testbench for scan_chain_a at 256 + 16 registers: a reference model that
// stores the chain as an ordered list of positions (serial mode) or as
// independent 16-bit lists (parallel mode) is shifted alongside the chain
// with random test-bus data, random clears and mode changes.
`include "tb/tb_check.svh"
module tb_scan_chain_a;
  localparam int unsigned N = 256, P = 16, T = 272;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, shift = 0, mux_tb = 0, tb_in = 0;
  logic [T-1:0] q, model;
  int order[T];   // order[m] = register at serial position m (0 = entry)
  scan_chain_a #(.N_WORDS(N), .P(P)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    int m = 0;
    // L1 segments from the top one down, then the L2 segment; within a
    // segment from the lowest-priority bit down.
    for (int j = N / P - 1; j >= 0; j--)
      for (int b = P - 1; b >= 0; b--) order[m++] = j * P + b;
    for (int b = P - 1; b >= 0; b--) order[m++] = N + b;
  end

  initial begin
    model = '0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      clr = ($urandom % 200 == 0);
      shift = ($urandom % 4 != 0);
      if (t % 400 == 0) mux_tb = $urandom;
      tb_in = $urandom;
      @(posedge clk);
      if (clr) model = '0;
      else if (shift) begin
        logic [T-1:0] nm;
        nm = model;
        if (mux_tb) begin
          for (int k = T - 1; k > 0; k--) nm[order[k]] = model[order[k-1]];
          nm[order[0]] = tb_in;
        end else begin
          for (int s = 0; s < T / P; s++) begin
            for (int k = P - 1; k > 0; k--) nm[order[s*P + k]] = model[order[s*P + k - 1]];
            nm[order[s*P]] = tb_in;
          end
        end
        model = nm;
      end
      #1;
      `CHECK(q == model, $sformatf("cycle %0d mux_tb=%0d", t, mux_tb))
    end
    `TB_DONE
  end
  initial begin
    #100000; failures++; $display("watchdog expired"); `TB_DONE
  end
endmodule
