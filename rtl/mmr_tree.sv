// mmr_tree: distributed N_WORDS-input multiple-match resolver.
//
// N_WORDS inputs are too many for one resolver, so P-input nodes (mmr_node)
// form a tree. Level 0 (L1) resolves the match lines in groups of P; each L1
// node's "match found" goes to a level-1 (L2) node, whose one-hot output
// enables only the highest-priority L1 node that has a match. The pattern
// repeats up to a single top node, which is enabled by 'enable'. Address 0 has
// the highest priority. With N_WORDS = 256 and P = 16 this is 16 L1 nodes and
// one L2 node.
//
// Test access (multiplexer Mux-1 and node isolation):
//   mux1_sel  = 0: L1 inputs come from the match-line latches (position a)
//             = 1: L1 inputs come from scan chain a (position b)
//   node_test = 1: the tree is cut into separate nodes. Inputs of the upper
//                  levels come from scan chain a instead of the "match found"
//                  signals, and every node is enabled so no higher node can
//                  disable it. With node_test = 0 the tree is connected.
// Scan chain a has one bit per input of every level, level by level
// (tcam_pkg::level_off); grant_all has the same layout and holds every node's
// output, for capture into scan chain b.
//   grant       : L1 outputs, one-hot, to the address encoder
//   match_found : some input matched (top node)
//   mmd         : more than one match anywhere in the tree
// Combinational. N_WORDS must be a power of P.
module mmr_tree #(
  parameter int unsigned N_WORDS = tcam_pkg::N_WORDS,
  parameter int unsigned P       = tcam_pkg::MMR_P,
  localparam int unsigned LEVELS = tcam_pkg::num_levels(N_WORDS, P),
  localparam int unsigned T      = tcam_pkg::chain_len(N_WORDS, P)
) (
  input  logic [N_WORDS-1:0] ml_in,
  input  logic [T-1:0]       sca,
  input  logic               mux1_sel,
  input  logic               node_test,
  input  logic               enable,
  output logic [T-1:0]       grant_all,
  output logic [N_WORDS-1:0] grant,
  output logic               match_found,
  output logic               mmd
);
  if (tcam_pkg::level_width(N_WORDS, P, LEVELS) != 1 || N_WORDS % P != 0) begin : g_check
    $error("mmr_tree: N_WORDS must be a power of P");
  end

  logic [T-1:0]       req_all;   // inputs of every node, level by level
  logic [T:N_WORDS]   mf_flat;   // "match found" of level k node j at level_off(k+1)+j
  logic [T/P-1:0]     mmd_all;   // one bit per node, level by level

  // Mux-1 at L1.
  assign req_all[N_WORDS-1:0] = mux1_sel ? sca[N_WORDS-1:0] : ml_in;

  for (genvar k = 0; k < LEVELS; k++) begin : g_lvl
    localparam int unsigned OFF   = tcam_pkg::level_off(N_WORDS, P, k);
    localparam int unsigned W     = tcam_pkg::level_width(N_WORDS, P, k);
    localparam int unsigned NOFF  = tcam_pkg::level_off(N_WORDS, P, k + 1);
    localparam int unsigned NODES = W / P;

    // Mux-1 at the upper levels: scan chain a while the tree is cut.
    if (k > 0) begin : g_mux1
      assign req_all[OFF +: W] = node_test ? sca[OFF +: W] : mf_flat[OFF +: W];
    end

    for (genvar j = 0; j < NODES; j++) begin : g_node
      logic en;
      if (k == LEVELS - 1) begin : g_top
        assign en = enable;
      end else begin : g_inner
        assign en = node_test | grant_all[NOFF + j];
      end
      mmr_node #(.P(P)) u_node (
        .req         (req_all[OFF + j*P +: P]),
        .en          (en),
        .grant       (grant_all[OFF + j*P +: P]),
        .match_found (mf_flat[NOFF + j]),
        .mmd         (mmd_all[OFF/P + j])
      );
    end
  end

  assign grant       = grant_all[N_WORDS-1:0];
  assign match_found = mf_flat[T];
  assign mmd         = |mmd_all;
endmodule
