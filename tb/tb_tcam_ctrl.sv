// Testbench for tcam_ctrl: the array, latches, resolver and encoder are
// replaced by a small model in the testbench that reacts to the controller's
// write, read, sense and clear signals. Checks the array strobes, read data,
// the order and number of search results, the no-match result and the cycle
// count of every command.
`include "tb/tb_check.svh"
module tb_tcam_ctrl;
  localparam int unsigned N = 16, L = 8, AW = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  tcam_pkg::op_t cmd_op = tcam_pkg::OP_NOP;
  logic [AW-1:0] cmd_addr = '0;
  logic [L-1:0] cmd_d1 = '0, cmd_d2 = '0;
  logic rd_valid, res_valid, res_hit, res_more;
  logic [L-1:0] rd_q1, rd_q2;
  logic [AW-1:0] res_addr, arr_addr, mae_addr;
  logic arr_we, arr_re, sense, clr_en, match_found, mmd;
  logic [L-1:0] arr_d1, arr_d2, arr_s1, arr_s2, arr_q1, arr_q2;
  // model of the rest of the block: a binary CAM on d1 (d2 ignored)
  logic [L-1:0] mem [N];
  logic [N-1:0] lat, g;

  tcam_ctrl #(.N_WORDS(N), .WORD_BITS(L)) dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (arr_we) mem[arr_addr] <= arr_d1;
    if (sense) for (int i = 0; i < N; i++) lat[i] <= (mem[i] == arr_s1);
    else if (clr_en) lat <= lat & ~g;
  end
  always_comb begin
    g = '0;
    for (int i = N - 1; i >= 0; i--) if (lat[i]) g = N'(1) << i;
    match_found = |lat;
    mmd = $countones(lat) > 1;
    mae_addr = '1;
    for (int i = 0; i < N; i++) if (g[i]) mae_addr = AW'(i);
    arr_q1 = arr_re ? mem[arr_addr] : '0;
    arr_q2 = ~arr_q1;
  end

  // Issue a command; return the number of cycles until ready again.
  task automatic issue(tcam_pkg::op_t op, int a, logic [L-1:0] d, output int cyc);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_addr = AW'(a); cmd_d1 = d; cmd_d2 = ~d;
    @(posedge clk);
    #1; cmd_valid = 0; cyc = 1;
    while (!cmd_ready) begin @(posedge clk); #1; cyc++; end
  endtask

  logic [L-1:0] ref_mem [N];
  int got[$];
  logic got_more[$];
  int nohit_results = 0;
  always @(posedge clk) if (res_valid) begin
    if (res_hit) begin got.push_back(int'(res_addr)); got_more.push_back(res_more); end
    else nohit_results++;
  end

  initial begin
    int cyc;
    for (int i = 0; i < N; i++) mem[i] = '0;
    lat = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // write: 4 distinct values, each stored at several addresses
    for (int a = 0; a < N; a++) begin
      ref_mem[a] = L'(($urandom % 4) * 17);
      issue(tcam_pkg::OP_WRITE, a, ref_mem[a], cyc);
      `CHECK(cyc == 2, $sformatf("write cycles %0d", cyc))
    end
    for (int a = 0; a < N; a++) begin
      issue(tcam_pkg::OP_READ, a, '0, cyc);
      `CHECK(cyc == 2, "read cycles")
      `CHECK(rd_q1 == ref_mem[a] && rd_q2 == ~ref_mem[a], $sformatf("read %0d", a))
    end
    for (int v = 0; v < 5; v++) begin
      int exp[$];
      exp.delete();
      for (int a = 0; a < N; a++) if (ref_mem[a] == L'(v * 17)) exp.push_back(a);
      got.delete(); got_more.delete();
      nohit_results = 0;
      issue(tcam_pkg::OP_SEARCH, 0, L'(v * 17), cyc);
      @(posedge clk); #1;
      `CHECK(cyc == 2 + ((exp.size() == 0) ? 1 : exp.size()), $sformatf("search cycles %0d", cyc))
      `CHECK(got.size() == exp.size(), $sformatf("v=%0d results %0d exp %0d", v, got.size(), exp.size()))
      for (int i = 0; i < got.size() && i < exp.size(); i++) begin
        `CHECK(got[i] == exp[i], $sformatf("v=%0d result %0d", v, i))
        `CHECK(got_more[i] == (i != exp.size() - 1), $sformatf("v=%0d more %0d", v, i))
      end
      `CHECK(nohit_results == (exp.size() == 0), "no-match result")
    end
    `TB_DONE
  end
  initial begin
    #100000; failures++; $display("watchdog expired"); `TB_DONE
  end
endmodule
