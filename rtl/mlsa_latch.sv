// mlsa_latch: match-line sense amplifiers and their latches.
//
// At the end of a search cycle (sense high) the state of every match line is
// sampled and held, so the multiple-match resolver can work on a stable
// vector while the array is free. Held matches are then removed one by one:
// clr is the one-hot output of the resolver for the match just returned, and
// that bit is cleared on the same edge. This lets the block return every
// matching address in priority order, as the device the design is based on
// does. The analog current-mode sensing is reduced here to a clocked sample;
// the per-match clearing is this design's choice of how matches are
// returned in sequence.
//   ml    : raw match lines from the array
//   sense : sample all match lines on this edge (takes priority over clr)
//   clr   : bits to clear on this edge
//   match : latched match vector
// Reset clears every latch.
module mlsa_latch #(
  parameter int unsigned N_WORDS = tcam_pkg::N_WORDS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_WORDS-1:0] ml,
  input  logic               sense,
  input  logic [N_WORDS-1:0] clr,
  output logic [N_WORDS-1:0] match
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     match <= '0;
    else if (sense) match <= ml;
    else            match <= match & ~clr;
  end
endmodule
