// mmr_node: one P-input multiple-match resolver (MMR) node.
//
// Of the request inputs that are high, only the one with the highest priority
// is passed on; input 0 has the highest priority, input P-1 the lowest. The
// node also reports whether any input is high (match found, used by the next
// tree level) and whether more than one is (multiple-match detection, MMD).
// When en is low the node passes nothing, which is how a higher tree level
// disables lower-priority nodes. match_found and mmd do not depend on en, since
// the higher level needs match_found to decide which node to enable.
// Implemented as an isolate-lowest-set-bit (req & -req); the node's gates are
// not given, so this is the simplest logic with the required function.
// Combinational.
module mmr_node #(
  parameter int unsigned P = tcam_pkg::MMR_P
) (
  input  logic [P-1:0] req,
  input  logic         en,
  output logic [P-1:0] grant,
  output logic         match_found,
  output logic         mmd
);
  assign grant       = en ? (req & (~req + P'(1))) : '0;
  assign match_found = |req;
  assign mmd         = |(req & (req - P'(1)));
endmodule
