// tcam_top: one TCAM block with its search path and test structures.
//
// Search path: the ternary array (tcam_array) compares a search key against
// every stored word at once; the match-line latches (mlsa_latch) hold the
// result; the multiple-match resolver tree (mmr_tree) keeps only the
// highest-priority match (lowest address) and flags multiple matches; the
// match address encoder (mae) turns that one-hot line into an address. The
// controller (tcam_ctrl) runs read, write and search commands and returns
// every match of a search in priority order, one per cycle.
//
// Test structures, so that the search path can be tested back to front
// (encoder, then resolver, then array):
//   Mux-1 (mux1_sel): resolver L1 inputs from the latches (0) or scan chain a (1)
//   node_test       : cut the resolver tree into separate, always-enabled nodes
//                     fed from scan chain a
//   Mux-TB (mux_tb) : scan chain a as parallel per-node chains loaded from the
//                     1-bit test bus tb_in (0) or as one serial chain (1)
//   Mux-2 (mux2_sel): scan chain b captures the resolver outputs (0) or
//                     shifts scb_in -> scb_out (1)
//   Mux-3 (mux3_sel): encoder inputs from the resolver (0) or from scan chain
//                     b (1)
// mae_addr is the encoder output itself (combinational), for the encoder and
// full-tree tests; mmr_match_found and mmd come straight from the resolver.
// Normal operation needs mux1_sel = mux3_sel = node_test = 0.
//
// This is the organisation of the block and its test structures as
// described; the widths of control signals, the command interface and the
// cycle timing (see tcam_ctrl) are this design's own.
module tcam_top#(
  parameter int unsigned N_WORDS   = tcam_pkg::N_WORDS,
  parameter int unsigned WORD_BITS = tcam_pkg::WORD_BITS,
  parameter int unsigned MMR_P     = tcam_pkg::MMR_P,
  parameter int unsigned PRE_BITS  = tcam_pkg::PRE_BITS,
  localparam int unsigned AW       = $clog2(N_WORDS),
  localparam int unsigned T        = tcam_pkg::chain_len(N_WORDS, MMR_P)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // user interface
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  tcam_pkg::op_t                  cmd_op,
  input  logic [AW-1:0]        cmd_addr,
  input  logic [WORD_BITS-1:0] cmd_d1,
  input  logic [WORD_BITS-1:0] cmd_d2,
  output logic                 rd_valid,
  output logic [WORD_BITS-1:0] rd_q1,
  output logic [WORD_BITS-1:0] rd_q2,
  output logic                 res_valid,
  output logic                 res_hit,
  output logic [AW-1:0]        res_addr,
  output logic                 res_more,
  // test interface
  input  logic                 mux1_sel,
  input  logic                 node_test,
  input  logic                 mux_tb,
  input  logic                 mux2_sel,
  input  logic                 mux3_sel,
  input  logic                 sca_clr,
  input  logic                 sca_shift,
  input  logic                 tb_in,
  input  logic                 scb_clr,
  input  logic                 scb_en,
  input  logic                 scb_in,
  output logic                 scb_out,
  output logic [AW-1:0]        mae_addr,
  output logic                 mmr_match_found,
  output logic                 mmd
);
  logic                 arr_we, arr_re;
  logic [AW-1:0]        arr_addr;
  logic [WORD_BITS-1:0] arr_d1, arr_d2, arr_s1, arr_s2, arr_q1, arr_q2;
  logic [N_WORDS-1:0]   pre_ml, ml, match, grant, mae_in;
  logic                 sense, clr_en;
  logic [T-1:0]         sca_q, scb_q, grant_all;

  tcam_ctrl #(.N_WORDS(N_WORDS), .WORD_BITS(WORD_BITS)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_addr, .cmd_d1, .cmd_d2,
    .rd_valid, .rd_q1, .rd_q2,
    .res_valid, .res_hit, .res_addr, .res_more,
    .arr_we, .arr_re, .arr_addr, .arr_d1, .arr_d2, .arr_s1, .arr_s2,
    .arr_q1, .arr_q2,
    .sense, .clr_en,
    .match_found (mmr_match_found),
    .mmd,
    .mae_addr
  );

  tcam_array #(.N_WORDS(N_WORDS), .WORD_BITS(WORD_BITS), .PRE_BITS(PRE_BITS)) u_array (
    .clk, .rst_n,
    .we (arr_we), .re (arr_re), .addr (arr_addr),
    .d1 (arr_d1), .d2 (arr_d2), .q1 (arr_q1), .q2 (arr_q2),
    .s1 (arr_s1), .s2 (arr_s2),
    .pre_ml, .ml
  );

  mlsa_latch #(.N_WORDS(N_WORDS)) u_mlsa (
    .clk, .rst_n,
    .ml,
    .sense,
    .clr   (grant & {N_WORDS{clr_en}}),
    .match
  );

  scan_chain_a #(.N_WORDS(N_WORDS), .P(MMR_P)) u_sca (
    .clk, .rst_n,
    .clr (sca_clr), .shift (sca_shift), .mux_tb, .tb_in,
    .q   (sca_q)
  );

  mmr_tree #(.N_WORDS(N_WORDS), .P(MMR_P)) u_mmr (
    .ml_in (match),
    .sca   (sca_q),
    .mux1_sel,
    .node_test,
    .enable (1'b1),
    .grant_all,
    .grant,
    .match_found (mmr_match_found),
    .mmd
  );

  scan_chain_b #(.N_WORDS(N_WORDS), .P(MMR_P)) u_scb (
    .clk, .rst_n,
    .clr (scb_clr), .en (scb_en), .mux2 (mux2_sel),
    .scan_in (scb_in), .d (grant_all), .q (scb_q), .scan_out (scb_out)
  );

  // Mux-3.
  assign mae_in = mux3_sel ? scb_q[N_WORDS-1:0] : grant;

  mae #(.N_WORDS(N_WORDS)) u_mae (
    .in   (mae_in),
    .addr (mae_addr)
  );

  // The pre-search match lines are internal only; they gate the main search.
  logic unused_pre;
  assign unused_pre = ^pre_ml;

  // A search must run with the resolver and encoder in their normal positions.
  a_normal_search: assert property (@(posedge clk) disable iff (!rst_n)
    clr_en |-> !mux1_sel && !mux3_sel && !node_test);
endmodule
