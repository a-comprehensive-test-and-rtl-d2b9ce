// Testbench for mae: every one-hot input must encode its own index, the
// all-zero input must leave all outputs precharged to one.
`include "tb/tb_check.svh"
module tb_mae;
  localparam int unsigned N = 256;
  int checks = 0, failures = 0;
  logic [N-1:0] in;
  logic [7:0] addr;
  mae #(.N_WORDS(N)) dut (.*);
  initial begin
    in = '0;
    #1;
    `CHECK(addr == 8'hff, "no input: outputs stay precharged")
    for (int i = 0; i < N; i++) begin
      in = N'(1) << i;
      #1;
      `CHECK(addr == 8'(i), $sformatf("line %0d gave %0d", i, addr))
    end
    `TB_DONE
  end
  initial begin
    #100000; failures++; $display("watchdog expired"); `TB_DONE
  end
endmodule
