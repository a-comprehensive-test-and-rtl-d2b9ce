// Diagnosis testbench: runs the intra-cell array test with its fault-location
// steps on a 16-word x 16-bit block (4-bit logical columns) into which one
// comparison-logic transistor fault at a time is injected, and checks that
// the test reports exactly that fault: its kind, word and bit.
//
// Faults are injected by forcing one cell's discharge term in tcam_word_cmp:
//   SOP on the BL1 or BL2 path  (the transistor never conducts)
//   SON on the BL1 or BL2 path  (the storage-gated transistor always conducts)
//   SON on the SL1 or SL2 path  (the search-gated transistor always conducts)
// Test steps, for ascending and then complemented (descending) contents:
//   1  every logical column of word a holds a
//   2a each column searched for each value, other columns masked; an extra
//      address u when searching for a is a stuck-open fault in word u at
//      relative bit log2(a XOR u)
//   2b a missing expected address: search again with one column bit masked
//      at a time; the address coming back locates a stuck-on BL transistor;
//      if none brings it back the word is marked
//   2c for each marked word, search for its full contents while half, then a
//      quarter, ... of the stored word is masked (binary search) to locate a
//      stuck-on SL transistor.
// A fault-free run must report nothing.
`include "tb/tb_check.svh"
module tb_tcam_diag;
  localparam int unsigned N = 16, L = 16, P = 16, AW = 4, COLS = L / AW;
  typedef enum int {F_NONE, F_SOP_BL1, F_SOP_BL2, F_SON_BL1, F_SON_BL2, F_SON_SL1, F_SON_SL2} fault_t;
  typedef enum int {R_SOP, R_BL_SON, R_SL_SON} report_t;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  tcam_pkg::op_t cmd_op = tcam_pkg::OP_NOP;
  logic [AW-1:0] cmd_addr = '0;
  logic [L-1:0] cmd_d1 = '0, cmd_d2 = '0;
  logic rd_valid, res_valid, res_hit, res_more;
  logic [L-1:0] rd_q1, rd_q2;
  logic [AW-1:0] res_addr, mae_addr;
  logic scb_out, mmr_match_found, mmd;

  tcam_top #(.N_WORDS(N), .WORD_BITS(L), .MMR_P(P), .PRE_BITS(4)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_op, .cmd_addr, .cmd_d1, .cmd_d2,
    .rd_valid, .rd_q1, .rd_q2, .res_valid, .res_hit, .res_addr, .res_more,
    .mux1_sel (1'b0), .node_test (1'b0), .mux_tb (1'b0), .mux2_sel (1'b0), .mux3_sel (1'b0),
    .sca_clr (1'b0), .sca_shift (1'b0), .tb_in (1'b0), .scb_clr (1'b0), .scb_en (1'b0),
    .scb_in (1'b0), .scb_out, .mae_addr, .mmr_match_found, .mmd
  );
  always #5 clk = ~clk;

  // fault selection: fm[w] has a 1 at the faulty bit of the faulty word
  logic [L-1:0] fm [N];
  fault_t ftype = F_NONE;
  logic [5:0] tsel;   // one-hot fault kind, bit k-1 for kind k

  for (genvar gw = 0; gw < N; gw++) begin : g_inj
    initial begin
      force dut.u_array.g_word[gw].u_cmp.discharge =
        (((dut.u_array.g_word[gw].u_cmp.sl2 & dut.u_array.g_word[gw].u_cmp.bl1) |
          (dut.u_array.g_word[gw].u_cmp.sl1 & dut.u_array.g_word[gw].u_cmp.bl2)) & ~fm[gw]) |
        (fm[gw] & (
           ({L{tsel[0]}} & (dut.u_array.g_word[gw].u_cmp.sl1 & dut.u_array.g_word[gw].u_cmp.bl2)) |
           ({L{tsel[1]}} & (dut.u_array.g_word[gw].u_cmp.sl2 & dut.u_array.g_word[gw].u_cmp.bl1)) |
           ({L{tsel[2]}} & (dut.u_array.g_word[gw].u_cmp.sl2 | (dut.u_array.g_word[gw].u_cmp.sl1 & dut.u_array.g_word[gw].u_cmp.bl2))) |
           ({L{tsel[3]}} & (dut.u_array.g_word[gw].u_cmp.sl1 | (dut.u_array.g_word[gw].u_cmp.sl2 & dut.u_array.g_word[gw].u_cmp.bl1))) |
           ({L{tsel[4]}} & (dut.u_array.g_word[gw].u_cmp.bl2 | (dut.u_array.g_word[gw].u_cmp.sl2 & dut.u_array.g_word[gw].u_cmp.bl1))) |
           ({L{tsel[5]}} & (dut.u_array.g_word[gw].u_cmp.bl1 | (dut.u_array.g_word[gw].u_cmp.sl1 & dut.u_array.g_word[gw].u_cmp.bl2)))));
    end
  end

  int got[$];
  always @(posedge clk) if (res_valid && res_hit) got.push_back(int'(res_addr));

  task automatic run_cmd(tcam_pkg::op_t op, int a, logic [L-1:0] d1, logic [L-1:0] d2);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_addr = AW'(a); cmd_d1 = d1; cmd_d2 = d2;
    @(posedge clk);
    #1; cmd_valid = 0;
    while (!cmd_ready) begin @(posedge clk); #1; end
  endtask

  task automatic write_t(int a, logic [L-1:0] v, logic [L-1:0] c);
    logic [L-1:0] d1, d2;
    for (int i = 0; i < L; i++) {d1[i], d2[i]} = tcam_pkg::tern(v[i], c[i]);
    run_cmd(tcam_pkg::OP_WRITE, a, d1, d2);
  endtask

  task automatic search_t(logic [L-1:0] kv, logic [L-1:0] kc);
    logic [L-1:0] s1, s2;
    for (int i = 0; i < L; i++) {s1[i], s2[i]} = tcam_pkg::tern(kv[i], kc[i]);
    got.delete();
    run_cmd(tcam_pkg::OP_SEARCH, 0, s1, s2);
    @(posedge clk); #1;
  endtask

  function automatic logic [L-1:0] word_of(int a, int pass);
    logic [AW-1:0] av;
    logic [L-1:0] v;
    av = AW'((pass != 0) ? ~a : a);
    for (int b = 0; b < L; b++) v[b] = av[b % AW];
    return v;
  endfunction

  function automatic int log2_onehot(int x);
    for (int i = 0; i < 32; i++) if (x == (1 << i)) return i;
    return -1;
  endfunction

  // reports as kind*1000 + word*100 + bit, deduplicated
  int reports[$];
  task automatic report(report_t k, int w, int b);
    int code = int'(k) * 1000 + w * 100 + b;
    foreach (reports[i]) if (reports[i] == code) return;
    reports.push_back(code);
  endtask

  task automatic intra_cell_test();
    reports.delete();
    for (int pass = 0; pass < 2; pass++) begin
      int marked[$];
      marked.delete();
      for (int a = 0; a < N; a++) write_t(a, word_of(a, pass), '1);   // step 1
      for (int c = 0; c < COLS; c++) begin
        for (int a = 0; a < N; a++) begin
          logic [L-1:0] kv, kc;
          bit found;
          kv = word_of(a, pass);
          kc = L'({AW{1'b1}}) << (c * AW);
          search_t(kv, kc);
          // step 2a
          foreach (got[i]) if (got[i] != a) begin
            int rb = log2_onehot(got[i] ^ a);
            if (rb >= 0) report(R_SOP, got[i], c * AW + rb);
          end
          // step 2b
          found = 0;
          foreach (got[i]) if (got[i] == a) found = 1;
          if (!found) begin
            bit located = 0;
            for (int rb = 0; rb < AW && !located; rb++) begin
              search_t(kv, kc & ~(L'(1) << (c * AW + rb)));
              foreach (got[i]) if (got[i] == a) located = 1;
              if (located) report(R_BL_SON, a, c * AW + rb);
            end
            if (!located) begin
              bit seen = 0;
              foreach (marked[i]) if (marked[i] == a) seen = 1;
              if (!seen) marked.push_back(a);
            end
          end
        end
      end
      // step 2c
      foreach (marked[m]) begin
        int a = marked[m];
        int lo = 0, hi = L;
        while (hi - lo > 1) begin
          int mid = (lo + hi) / 2;
          logic [L-1:0] care;
          bit back = 0;
          care = '1;
          for (int b = lo; b < mid; b++) care[b] = 1'b0;
          write_t(a, word_of(a, pass), care);
          search_t(word_of(a, pass), '1);
          foreach (got[i]) if (got[i] == a) back = 1;
          if (back) hi = mid; else lo = mid;
        end
        write_t(a, word_of(a, pass), '1);
        report(R_SL_SON, a, lo);
      end
    end
  endtask

  initial begin
    int n_found[7];
    for (int w = 0; w < N; w++) fm[w] = '0;
    tsel = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    intra_cell_test();
    `CHECK(reports.size() == 0, $sformatf("fault-free run reported %0d faults", reports.size()))
    for (int k = 1; k <= 6; k++) n_found[k] = 0;
    for (int t = 0; t < 30; t++) begin
      int w, b, exp_code;
      fault_t f;
      f = fault_t'(1 + t % 6);
      w = $urandom % N;
      b = $urandom % L;
      ftype = f;
      tsel = 6'(1) << (int'(f) - 1);
      fm[w] = L'(1) << b;
      intra_cell_test();
      case (f)
        F_SOP_BL1, F_SOP_BL2: exp_code = int'(R_SOP) * 1000;
        F_SON_BL1, F_SON_BL2: exp_code = int'(R_BL_SON) * 1000;
        default:              exp_code = int'(R_SL_SON) * 1000;
      endcase
      exp_code += w * 100 + b;
      `CHECK(reports.size() == 1 && reports[0] == exp_code,
             $sformatf("fault %s word %0d bit %0d: %0d reports, first %0d",
                       f.name(), w, b, reports.size(), (reports.size() > 0) ? reports[0] : -1))
      if (reports.size() == 1 && reports[0] == exp_code) n_found[int'(f)]++;
      fm[w] = '0;
      tsel = '0;
    end
    for (int k = 1; k <= 6; k++)
      `CHECK(n_found[k] > 0, $sformatf("fault kind %0d never located", k))
    $display("located: SOP_BL1=%0d SOP_BL2=%0d SON_BL1=%0d SON_BL2=%0d SON_SL1=%0d SON_SL2=%0d",
             n_found[1], n_found[2], n_found[3], n_found[4], n_found[5], n_found[6]);
    begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
