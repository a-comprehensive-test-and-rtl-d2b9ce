// Testbench for mlsa_latch: sampling on sense, holding otherwise, clearing the
// bits named by clr, sense winning over clr, and reset.
`include "tb/tb_check.svh"
module tb_mlsa_latch;
  localparam int unsigned N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sense = 0;
  logic [N-1:0] ml = '0, clr = '0, match, expq;
  mlsa_latch #(.N_WORDS(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    @(negedge clk);
    `CHECK(match == '0, "reset")
    rst_n = 1;
    expq = '0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      ml = N'($urandom);
      sense = ($urandom % 3 == 0);
      clr = N'($urandom) & N'($urandom);
      @(posedge clk);
      expq = sense ? ml : (expq & ~clr);
      #1;
      `CHECK(match == expq, $sformatf("cycle %0d", t))
    end
    `TB_DONE
  end
  initial begin
    #100000; failures++; $display("watchdog expired"); `TB_DONE
  end
endmodule
