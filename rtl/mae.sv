// mae: match address encoder.
//
// A ROM with N_WORDS input lines and log2(N_WORDS) outputs. Every output line
// is precharged to 1; input line i pulls down each output bit that is 0 in the
// binary value i. With exactly one input high the outputs therefore give its
// address, and with no input high they stay all ones. This is the
// precharge/pull-down structure of the dynamic encoder, written as logic: bit b
// is the NOR of the inputs whose address has bit b clear. More than one input
// high never occurs behind the resolver and gives the AND of their addresses.
// Combinational.
//   in   : one-hot lines from the resolver (or from scan chain b in test)
//   addr : encoded address
module mae #(
  parameter int unsigned N_WORDS = tcam_pkg::N_WORDS,
  localparam int unsigned AW     = $clog2(N_WORDS)
) (
  input  logic [N_WORDS-1:0] in,
  output logic [AW-1:0]      addr
);
  // Output bit b is precharged high and pulled low by every active line i
  // whose address has bit b clear.
  always_comb begin
    for (int unsigned b = 0; b < AW; b++) begin
      addr[b] = 1'b1;
      for (int unsigned i = 0; i < N_WORDS; i++)
        if (in[i] && ((i >> b) & 1) == 0) addr[b] = 1'b0;
    end
  end
endmodule
