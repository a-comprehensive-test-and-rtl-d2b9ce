// tcam_word_cmp: comparison logic and match lines of one TCAM word.
//
// Every cell has two discharge paths to its word's match line (ML): one
// through the transistors gated by SL2 and BL1, one through SL1 and BL2. The ML
// stays charged (match) only if no cell conducts, i.e. no bit has
// (SL2 & BL1) | (SL1 & BL2). This is not an XOR, because either pair may be
// 00: a stored X or a searched X never discharges.
//
// The ML is split in two, as in the word the design is based on: a pre-search
// ML over the low PRE_BITS bits and a main-search ML over the rest. The main ML
// is precharged only when the pre-search ML matched, so a word that fails the
// pre-search reads as a mismatch without evaluating its main segment. Which
// bits form the pre-search segment is this design's choice (the low bits).
//
// Purely combinational; the sense latch (mlsa_latch) samples the result.
//   bl1/bl2 : stored cell contents of the word
//   sl1/sl2 : search lines driven for the search key
//   pre_ml  : 1 if the pre-search segment matched
//   ml      : 1 if the whole word matched
module tcam_word_cmp #(
  parameter int unsigned WORD_BITS = tcam_pkg::WORD_BITS,
  parameter int unsigned PRE_BITS  = tcam_pkg::PRE_BITS
) (
  input  logic [WORD_BITS-1:0] bl1,
  input  logic [WORD_BITS-1:0] bl2,
  input  logic [WORD_BITS-1:0] sl1,
  input  logic [WORD_BITS-1:0] sl2,
  output logic                 pre_ml,
  output logic                 ml
);
  // Per-cell discharge paths.
  logic [WORD_BITS-1:0] discharge;
  assign discharge = (sl2 & bl1) | (sl1 & bl2);

  assign pre_ml  = ~|discharge[PRE_BITS-1:0];
  // The main ML is precharged only after a pre-search match; an ML that is not
  // precharged sits at ground and senses as a mismatch.
  assign ml      = pre_ml & ~|discharge[WORD_BITS-1:PRE_BITS];
endmodule
