// wl_decoder: read/write address decoder and word-line drivers.
//
// Turns a binary word address into one-hot word lines. All lines stay low
// unless en is high, so no word is selected outside a read or write. The
// decoder itself is the ordinary RAM one; its logic is this design's own
// (a compare per line).
//   addr : word address, AW = log2(N_WORDS) bits
//   en   : word-line enable (read or write cycle)
//   wl   : one-hot word lines, wl[i] high when en and addr == i
// Combinational.
module wl_decoder #(
  parameter int unsigned N_WORDS = tcam_pkg::N_WORDS,
  localparam int unsigned AW     = $clog2(N_WORDS)
) (
  input  logic [AW-1:0]      addr,
  input  logic               en,
  output logic [N_WORDS-1:0] wl
);
  always_comb begin
    for (int unsigned i = 0; i < N_WORDS; i++)
      wl[i] = en && (addr == AW'(i));
  end
endmodule
