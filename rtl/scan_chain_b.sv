// scan_chain_b: scan chain "b" (SC-b) with its input multiplexers (Mux-2).
//
// SC-b holds one register per MMR node output of every level (same layout as
// scan chain a). Each register's input is chosen by Mux-2:
//   mux2 = 0 (position a): capture, all registers load the MMR outputs d in
//                          parallel
//   mux2 = 1 (position b): shift, register 0 loads scan_in and register i
//                          loads register i-1; scan_out is the last register
// The L1 part (bits N_WORDS-1:0) can drive the match address encoder through
// Mux-3 (in tcam_top) so that vectors shifted in here test the encoder.
// en enables a capture or shift on the rising clock edge; clr clears every
// register in one cycle and wins over en. Reset clears the chain.
module scan_chain_b #(
  parameter int unsigned N_WORDS = tcam_pkg::N_WORDS,
  parameter int unsigned P       = tcam_pkg::MMR_P,
  localparam int unsigned T      = tcam_pkg::chain_len(N_WORDS, P)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         mux2,
  input  logic         scan_in,
  input  logic [T-1:0] d,
  output logic [T-1:0] q,
  output logic         scan_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (clr)      q <= '0;
    else if (en) begin
      if (mux2)        q <= {q[T-2:0], scan_in};
      else             q <= d;
    end
  end

  assign scan_out = q[T-1];
endmodule
