// tcam_ctrl: command controller of the TCAM block.
//
// Accepts one user command at a time (read, write or search) with a
// valid/ready handshake and sequences the array, the match-line latches and
// the result output. It has the idle, read, write and search states of the
// controller the design is based on, here as a synchronous machine, plus a
// result state in which the matches of a search leave one per cycle in
// priority order until the multiple-match detection (MMD) says none remain.
//
// Timing (cycles counted from the edge that accepts the command):
//   write : array written at the end of the next cycle; ready again after 2
//   read  : rd_valid with rd_q1/rd_q2 one cycle after the read cycle (2)
//   search: match lines sensed at the end of the next cycle; then one result
//           per cycle (res_valid), the first 2 cycles after acceptance. A
//           search with k >= 1 matches gives k results, the last with
//           res_more = 0; a search with no match gives one result with
//           res_hit = 0. Ready again the cycle after the last result.
// All of these latencies are this design's choices.
//   cmd_d1/cmd_d2 : BL1/BL2 bits to write, or SL1/SL2 bits to search
//   match_found, mmd, mae_addr : from the resolver and encoder, combinational
//   sense, clr_en : to the match-line latches (clr_en removes the returned
//                   match)
// The command fields must stay stable while cmd_valid is high and not yet
// accepted.
module tcam_ctrl#(
  parameter int unsigned N_WORDS   = tcam_pkg::N_WORDS,
  parameter int unsigned WORD_BITS = tcam_pkg::WORD_BITS,
  localparam int unsigned AW       = $clog2(N_WORDS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // user command
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  tcam_pkg::op_t                  cmd_op,
  input  logic [AW-1:0]        cmd_addr,
  input  logic [WORD_BITS-1:0] cmd_d1,
  input  logic [WORD_BITS-1:0] cmd_d2,
  // read data out
  output logic                 rd_valid,
  output logic [WORD_BITS-1:0] rd_q1,
  output logic [WORD_BITS-1:0] rd_q2,
  // search results out
  output logic                 res_valid,
  output logic                 res_hit,
  output logic [AW-1:0]        res_addr,
  output logic                 res_more,
  // array
  output logic                 arr_we,
  output logic                 arr_re,
  output logic [AW-1:0]        arr_addr,
  output logic [WORD_BITS-1:0] arr_d1,
  output logic [WORD_BITS-1:0] arr_d2,
  output logic [WORD_BITS-1:0] arr_s1,
  output logic [WORD_BITS-1:0] arr_s2,
  input  logic [WORD_BITS-1:0] arr_q1,
  input  logic [WORD_BITS-1:0] arr_q2,
  // match-line latches, resolver and encoder
  output logic                 sense,
  output logic                 clr_en,
  input  logic                 match_found,
  input  logic                 mmd,
  input  logic [AW-1:0]        mae_addr
);
  typedef enum logic [2:0] {
    S_IDLE, S_READ, S_WRITE, S_SEARCH, S_RESULT
  } state_t;

  state_t               state;
  logic [AW-1:0]        addr_q;
  logic [WORD_BITS-1:0] d1_q, d2_q;

  assign cmd_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      addr_q    <= '0;
      d1_q      <= '0;
      d2_q      <= '0;
      rd_valid  <= 1'b0;
      rd_q1     <= '0;
      rd_q2     <= '0;
      res_valid <= 1'b0;
      res_hit   <= 1'b0;
      res_addr  <= '0;
      res_more  <= 1'b0;
    end else begin
      rd_valid  <= 1'b0;
      res_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cmd_valid) begin
            addr_q <= cmd_addr;
            d1_q   <= cmd_d1;
            d2_q   <= cmd_d2;
            unique case (cmd_op)
              tcam_pkg::OP_READ:   state <= S_READ;
              tcam_pkg::OP_WRITE:  state <= S_WRITE;
              tcam_pkg::OP_SEARCH: state <= S_SEARCH;
              default:   state <= S_IDLE;
            endcase
          end
        end
        S_WRITE: state <= S_IDLE;
        S_READ: begin
          rd_valid <= 1'b1;
          rd_q1    <= arr_q1;
          rd_q2    <= arr_q2;
          state    <= S_IDLE;
        end
        S_SEARCH: state <= S_RESULT;
        S_RESULT: begin
          res_valid <= 1'b1;
          res_hit   <= match_found;
          res_addr  <= mae_addr;
          res_more  <= mmd;
          if (!mmd) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign arr_we   = (state == S_WRITE);
  assign arr_re   = (state == S_READ);
  assign arr_addr = addr_q;
  assign arr_d1   = d1_q;
  assign arr_d2   = d2_q;
  // Search lines are driven only in the search cycle; otherwise both lines of
  // every column stay low.
  assign arr_s1   = (state == S_SEARCH) ? d1_q : '0;
  assign arr_s2   = (state == S_SEARCH) ? d2_q : '0;
  assign sense    = (state == S_SEARCH);
  assign clr_en   = (state == S_RESULT);

  // Handshake rule: a command that is offered stays offered until accepted.
  a_cmd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd_op) && $stable(cmd_addr));
endmodule
