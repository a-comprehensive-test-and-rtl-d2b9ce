// tcam_array: ternary storage of N_WORDS words of WORD_BITS cells, with read,
// write and a parallel search of every word.
//
// Each cell holds two storage bits, BL1 and BL2 (encoding in tcam_pkg). A
// write puts d1/d2 on the bit lines and raises the addressed word line; a
// read returns both storage bits of the addressed word, as the bit-line sense
// amplifiers would; a search drives s1/s2 onto the search lines of every column
// and every word's comparison logic (tcam_word_cmp) resolves its match line at
// once. The storage bits are written independently, so RAM-style tests can
// address each storage node directly.
//
// Timing: write on the rising clock edge with we high. Read data and match
// lines are combinational from the stored contents and inputs; the caller
// registers them. Contents are cleared to 0 (every cell X) on reset, which is
// this design's choice: the dynamic storage of the original cell has no reset.
//   we, re, addr : write/read enable and word address
//   d1, d2       : BL1/BL2 bits to write
//   q1, q2       : BL1/BL2 bits of the addressed word (0 when re is low)
//   s1, s2       : SL1/SL2 search lines
//   pre_ml       : per-word pre-search match lines
//   ml           : per-word full match lines, to the match-line sense latches
module tcam_array #(
  parameter int unsigned N_WORDS   = tcam_pkg::N_WORDS,
  parameter int unsigned WORD_BITS = tcam_pkg::WORD_BITS,
  parameter int unsigned PRE_BITS  = tcam_pkg::PRE_BITS,
  localparam int unsigned AW       = $clog2(N_WORDS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic                 re,
  input  logic [AW-1:0]        addr,
  input  logic [WORD_BITS-1:0] d1,
  input  logic [WORD_BITS-1:0] d2,
  output logic [WORD_BITS-1:0] q1,
  output logic [WORD_BITS-1:0] q2,
  input  logic [WORD_BITS-1:0] s1,
  input  logic [WORD_BITS-1:0] s2,
  output logic [N_WORDS-1:0]   pre_ml,
  output logic [N_WORDS-1:0]   ml
);
  logic [WORD_BITS-1:0] bl1 [N_WORDS];
  logic [WORD_BITS-1:0] bl2 [N_WORDS];
  logic [N_WORDS-1:0]   wl;

  wl_decoder #(.N_WORDS(N_WORDS)) u_dec (
    .addr (addr),
    .en   (we | re),
    .wl   (wl)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N_WORDS; i++) begin
        bl1[i] <= '0;
        bl2[i] <= '0;
      end
    end else if (we) begin
      for (int unsigned i = 0; i < N_WORDS; i++) begin
        if (wl[i]) begin
          bl1[i] <= d1;
          bl2[i] <= d2;
        end
      end
    end
  end

  // Bit lines during a read: the selected word drives both storage bits.
  always_comb begin
    q1 = '0;
    q2 = '0;
    if (!we) begin
      for (int unsigned i = 0; i < N_WORDS; i++) begin
        q1 |= bl1[i] & {WORD_BITS{wl[i]}};
        q2 |= bl2[i] & {WORD_BITS{wl[i]}};
      end
    end
  end

  for (genvar i = 0; i < N_WORDS; i++) begin : g_word
    tcam_word_cmp #(.WORD_BITS(WORD_BITS), .PRE_BITS(PRE_BITS)) u_cmp (
      .bl1     (bl1[i]),
      .bl2     (bl2[i]),
      .sl1     (s1),
      .sl2     (s2),
      .pre_ml  (pre_ml[i]),
      .ml      (ml[i])
    );
  end
endmodule
