// scan_chain_a: scan chain "a" (SC-a) with its test-bus multiplexers (Mux-TB).
//
// SC-a holds one register per input of every MMR node, level by level (layout
// in tcam_pkg). It is cut into P-bit segments, one per node. Within a segment
// the bits move from the lowest-priority register (P-1) towards the
// highest-priority one (0) on every shift, so a string of 1s fills a node from
// its lowest-priority input upwards. The register that enters a segment is
// chosen by that segment's Mux-TB:
//   mux_tb = 0 (position a): every segment loads from the 1-bit MMR test bus
//                            tb_in, so all segments act as parallel P-bit
//                            chains holding the same vector (node test)
//   mux_tb = 1 (position b): each segment loads from bit 0 of the segment
//                            before it, forming one serial chain (full tree
//                            test). The chain starts at the top L1 segment,
//                            runs down to L1 segment 0, then continues through
//                            the upper levels in the same way.
// clr clears the whole chain in one cycle (set/reset scan registers); shift
// advances it by one. Both act on the rising clock edge; clr wins. Reset
// clears it too. The serial order across levels is this design's reading of
// "previous 16-bit SC".
module scan_chain_a #(
  parameter int unsigned N_WORDS = tcam_pkg::N_WORDS,
  parameter int unsigned P       = tcam_pkg::MMR_P,
  localparam int unsigned LEVELS = tcam_pkg::num_levels(N_WORDS, P),
  localparam int unsigned T      = tcam_pkg::chain_len(N_WORDS, P)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         shift,
  input  logic         mux_tb,
  input  logic         tb_in,
  output logic [T-1:0] q
);
  logic [T-1:0] nxt;

  for (genvar k = 0; k < LEVELS; k++) begin : g_lvl
    localparam int unsigned OFF  = tcam_pkg::level_off(N_WORDS, P, k);
    localparam int unsigned NSEG = tcam_pkg::level_width(N_WORDS, P, k) / P;
    for (genvar j = 0; j < NSEG; j++) begin : g_seg
      localparam int unsigned BASE = OFF + j*P;
      logic seg_in;
      if (k == 0 && j == NSEG - 1) begin : g_first
        assign seg_in = tb_in;
      end else if (j < NSEG - 1) begin : g_next_seg
        assign seg_in = mux_tb ? q[BASE + P] : tb_in;
      end else begin : g_prev_lvl
        assign seg_in = mux_tb ? q[tcam_pkg::level_off(N_WORDS, P, k - 1)] : tb_in;
      end
      assign nxt[BASE +: P] = {seg_in, q[BASE + 1 +: P - 1]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clr)   q <= '0;
    else if (shift) q <= nxt;
  end
endmodule
