// tcam_pkg: constants, types and geometry helpers shared by the TCAM block.
//
// Cell encoding. A ternary cell stores two bits, BL1 and BL2, in two storage
// nodes; a search drives two search lines, SL1 and SL2, with the same code:
//   value   BL1/SL1  BL2/SL2
//   0          0        1
//   1          1        0
//   X          0        0      (stored: never mismatches; searched: masks the bit)
//   unused     1        1
// A cell discharges its match line when (SL2 & BL1) | (SL1 & BL2). This is the
// table and discharge rule of the comparison logic described for the cell; the
// 2-bit packing below is this design's own.
//
// Geometry. The multiple-match resolver (MMR) is a tree of P-input nodes. Level
// 0 (L1) has N inputs, level k has N/P**k inputs, the last level has one node.
// Both scan chains hold one bit per MMR input of every level, laid out level by
// level: level k occupies bits [level_off(k) +: level_width(k)].
package tcam_pkg;

  // Defaults: a 256-word block of 144-bit words resolved by 16-input MMR nodes,
  // with a 36-bit pre-search segment.
  parameter int unsigned N_WORDS   = 256;
  parameter int unsigned WORD_BITS = 144;
  parameter int unsigned MMR_P     = 16;
  parameter int unsigned PRE_BITS  = 36;

  // Cell codes as {BL1, BL2} / {SL1, SL2}.
  typedef logic [1:0] cell_t;
  localparam cell_t CELL_0 = 2'b01;
  localparam cell_t CELL_1 = 2'b10;
  localparam cell_t CELL_X = 2'b00;

  // User commands.
  typedef enum logic [1:0] {
    OP_NOP    = 2'd0,
    OP_READ   = 2'd1,
    OP_WRITE  = 2'd2,
    OP_SEARCH = 2'd3
  } op_t;

  // Number of MMR tree levels for n inputs and p-input nodes (n = p**levels).
  function automatic int unsigned num_levels(int unsigned n, int unsigned p);
    int unsigned l = 0;
    int unsigned w = n;
    while (w > 1) begin
      w = w / p;
      l++;
    end
    return l;
  endfunction

  // Inputs at level k.
  function automatic int unsigned level_width(int unsigned n, int unsigned p, int unsigned k);
    int unsigned w = n;
    for (int unsigned i = 0; i < k; i++) w = w / p;
    return w;
  endfunction

  // Offset of level k in the flattened per-level vectors.
  function automatic int unsigned level_off(int unsigned n, int unsigned p, int unsigned k);
    int unsigned o = 0;
    int unsigned w = n;
    for (int unsigned i = 0; i < k; i++) begin
      o = o + w;
      w = w / p;
    end
    return o;
  endfunction

  // Total scan-chain length: n + n/p + n/p**2 + ... (one bit per MMR input).
  function automatic int unsigned chain_len(int unsigned n, int unsigned p);
    return level_off(n, p, num_levels(n, p));
  endfunction

  // Ternary encode: value bits v, care bits c (c=0 gives X).
  function automatic logic [1:0] tern(logic v, logic c);
    return c ? (v ? CELL_1 : CELL_0) : CELL_X;
  endfunction

endpackage
