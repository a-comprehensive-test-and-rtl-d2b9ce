// End-to-end testbench for tcam_top at its default size (256 words x 144
// bits, 16-input resolver nodes, 36-bit pre-search). It runs the test flow the
// block's test structures exist for, back to front, and then the array tests:
//   1. encoder test: a single 1 walks through scan chain b with the encoder
//      fed from it; every address 0..n-1 must appear (n shifts)
//   2. resolver node test: scan chain a as parallel 16-bit chains, tree cut;
//      after each of p+1 fill steps the node outputs are captured in scan
//      chain b and shifted out (T*(p+1) shifts, T = n + n/p)
//   3. resolver full-tree test: scan chain a serial, tree connected, encoder
//      output compared after each of n+1 fill steps
//   4. intra-cell array test: every 8-bit logical column of word a holds a,
//      each column searched for each value with the other columns masked;
//      repeated with complemented data (2n writes, 2n*l/log2(n) searches)
//   5. inter-cell array test, steps 1-6: alternating 0/1 words, then all
//      zeros, with walking-1 and all-0/all-1 keys (4n writes, 6l walking-bit
//      searches plus 6 all-0/all-1 searches, 4n returned addresses)
//   6. reads, multiple matches with MMD, a search with no match, and the
//      pre-search gating, with the cycle count of writes and searches.
// Expected search results come from a reference copy of the stored words.
// Each mechanism is counted and a failure is counted for any that never
// happened.
`include "tb/tb_check.svh"
module tb_tcam_top;
  localparam int unsigned N = tcam_pkg::N_WORDS, L = tcam_pkg::WORD_BITS;
  localparam int unsigned P = tcam_pkg::MMR_P, AW = $clog2(N);
  localparam int unsigned T = tcam_pkg::chain_len(N, P);
  localparam int unsigned COLS = L / AW;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  tcam_pkg::op_t cmd_op = tcam_pkg::OP_NOP;
  logic [AW-1:0] cmd_addr = '0;
  logic [L-1:0] cmd_d1 = '0, cmd_d2 = '0;
  logic rd_valid, res_valid, res_hit, res_more;
  logic [L-1:0] rd_q1, rd_q2;
  logic [AW-1:0] res_addr, mae_addr;
  logic mux1_sel = 0, node_test = 0, mux_tb = 0, mux2_sel = 0, mux3_sel = 0;
  logic sca_clr = 0, sca_shift = 0, tb_in = 0, scb_clr = 0, scb_en = 0, scb_in = 0;
  logic scb_out, mmr_match_found, mmd;

  tcam_top dut (.*);
  always #5 clk = ~clk;

  // reference contents
  logic [L-1:0] ref_v [N];
  logic [L-1:0] ref_c [N];

  // operation and mechanism counters
  int n_shift = 0, n_write = 0, n_search = 0, n_readout = 0, n_read = 0;
  int m_mae = 0, m_node = 0, m_full = 0, m_capture = 0, m_multi = 0, m_nomatch = 0;
  int m_pregate = 0, m_par_shift = 0, m_ser_shift = 0;

  // search results collected from the result port
  int got[$];
  logic got_more[$];
  int got_nohit = 0;
  always @(posedge clk) if (res_valid) begin
    if (res_hit) begin got.push_back(int'(res_addr)); got_more.push_back(res_more); end
    else got_nohit++;
  end
  // words whose main match line was left unprecharged by a pre-search miss
  always @(posedge clk) if (dut.sense) m_pregate += $countones(~dut.u_array.pre_ml);

  task automatic run_cmd(tcam_pkg::op_t op, int a, logic [L-1:0] d1, logic [L-1:0] d2,
                         output int cyc);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_addr = AW'(a); cmd_d1 = d1; cmd_d2 = d2;
    @(posedge clk);
    #1; cmd_valid = 0; cyc = 1;
    while (!cmd_ready) begin @(posedge clk); #1; cyc++; end
  endtask

  task automatic write_t(int a, logic [L-1:0] v, logic [L-1:0] c);
    logic [L-1:0] d1, d2;
    int cyc;
    for (int i = 0; i < L; i++) {d1[i], d2[i]} = tcam_pkg::tern(v[i], c[i]);
    run_cmd(tcam_pkg::OP_WRITE, a, d1, d2, cyc);
    ref_v[a] = v; ref_c[a] = c;
    n_write++;
    `CHECK(cyc == 2, $sformatf("write took %0d cycles", cyc))
  endtask

  // Search for key (value kv, care kc); compare all returned addresses, in
  // order, with the reference. Returns the number of matches.
  task automatic search_t(logic [L-1:0] kv, logic [L-1:0] kc, string tag, output int nm);
    logic [L-1:0] s1, s2;
    int exp[$];
    int cyc;
    bit ok;
    exp.delete();
    for (int w = 0; w < N; w++)
      if (((ref_v[w] ^ kv) & ref_c[w] & kc) == '0) exp.push_back(w);
    for (int i = 0; i < L; i++) {s1[i], s2[i]} = tcam_pkg::tern(kv[i], kc[i]);
    got.delete(); got_more.delete(); got_nohit = 0;
    run_cmd(tcam_pkg::OP_SEARCH, 0, s1, s2, cyc);
    @(posedge clk); #1;   // last result register
    n_search++;
    n_readout += got.size();
    ok = (got.size() == exp.size()) && (got_nohit == int'(exp.size() == 0));
    for (int i = 0; i < got.size() && i < exp.size(); i++)
      ok &= (got[i] == exp[i]) && (got_more[i] == (i != exp.size() - 1));
    `CHECK(ok, $sformatf("%s: %0d results, expected %0d", tag, got.size(), exp.size()))
    `CHECK(cyc == 2 + ((exp.size() == 0) ? 1 : exp.size()), $sformatf("%s: search took %0d cycles", tag, cyc))
    if (exp.size() > 1) m_multi++;
    if (exp.size() == 0) m_nomatch++;
    nm = exp.size();
  endtask

  // One clock with the given scan-chain strobes.
  task automatic scan_step(logic a_shift, logic a_in, logic b_en, logic b_in);
    @(negedge clk);
    sca_shift = a_shift; tb_in = a_in; scb_en = b_en; scb_in = b_in;
    @(posedge clk); #1;
    sca_shift = 0; scb_en = 0;
    if (a_shift) begin if (mux_tb) m_ser_shift++; else m_par_shift++; end
  endtask

  task automatic clear_chains();
    @(negedge clk); sca_clr = 1; scb_clr = 1;
    @(posedge clk); #1; sca_clr = 0; scb_clr = 0;
  endtask

  initial begin
    int nm, shifts;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1. encoder test -------------------------------------------------
    mux2_sel = 1; mux3_sel = 1;
    clear_chains();
    `CHECK(mae_addr == '1, "encoder with no input stays precharged")
    shifts = 0;
    for (int j = 0; j < N; j++) begin
      scan_step(0, 0, 1, j == 0);
      shifts++;
      `CHECK(mae_addr == AW'(j), $sformatf("encoder address %0d read %0d", j, mae_addr))
      m_mae++;
    end
    `CHECK(shifts == N, "encoder test takes n shifts")
    n_shift += shifts;

    // ---- 2. resolver node test -------------------------------------------
    mux3_sel = 0; mux1_sel = 1; node_test = 1; mux_tb = 0;
    clear_chains();
    shifts = 0;
    for (int k = 0; k <= P; k++) begin
      logic [T-1:0] exp, seen;
      if (k > 0) scan_step(1, 1, 0, 0);
      exp = '0;
      if (k > 0) for (int j = 0; j < T / P; j++) exp[j*P + P - k] = 1'b1;
      mux2_sel = 0;
      scan_step(0, 0, 1, 0);   // capture all node outputs
      m_capture++;
      mux2_sel = 1;
      for (int i = T - 1; i >= 0; i--) begin
        seen[i] = scb_out;
        scan_step(0, 0, 1, 0);
        shifts++;
      end
      `CHECK(seen == exp, $sformatf("node test vector %0d", k))
      m_node++;
    end
    `CHECK(shifts == T * (P + 1), $sformatf("node test read-out %0d shifts", shifts))
    n_shift += shifts + P;

    // ---- 3. resolver full-tree test --------------------------------------
    node_test = 0; mux_tb = 1;
    clear_chains();
    `CHECK(!mmr_match_found, "full tree: empty chain gives no match")
    shifts = 0;
    for (int k = 1; k <= N; k++) begin
      scan_step(1, 1, 0, 0);
      shifts++;
      `CHECK(mmr_match_found && mae_addr == AW'(N - k) && mmd == (k > 1),
             $sformatf("full tree step %0d gave %0d", k, mae_addr))
      m_full++;
    end
    `CHECK(shifts + 1 == N + 1, "full tree test uses n+1 patterns")
    n_shift += shifts;
    mux1_sel = 0;

    // ---- 4. intra-cell array test ----------------------------------------
    begin
      int w0, s0;
      w0 = n_write; s0 = n_search;
      for (int pass = 0; pass < 2; pass++) begin
        for (int a = 0; a < N; a++) begin
          logic [L-1:0] v;
          logic [AW-1:0] av;
          av = AW'((pass != 0) ? ~a : a);
          for (int b = 0; b < L; b++) v[b] = av[b % AW];
          write_t(a, v, '1);
        end
        for (int c = 0; c < COLS; c++) begin
          for (int a = 0; a < N; a++) begin
            logic [L-1:0] kv, kc;
            logic [AW-1:0] av;
            av = AW'((pass != 0) ? ~a : a);
            kv = '0; kc = '0;
            for (int b = 0; b < AW; b++) begin
              kv[c*AW + b] = av[b];
              kc[c*AW + b] = 1'b1;
            end
            search_t(kv, kc, $sformatf("intra pass %0d col %0d value %0d", pass, c, a), nm);
            `CHECK(nm == 1 && got.size() == 1 && got[0] == a, $sformatf("intra col %0d addr %0d", c, a))
          end
        end
      end
      `CHECK(n_write - w0 == 2 * N, "intra-cell writes = 2n")
      `CHECK(n_search - s0 == 2 * N * COLS, "intra-cell searches = 2n*l/log2(n)")
    end

    // ---- 5. inter-cell array test ----------------------------------------
    begin
      int w0, s0, r0;
      w0 = n_write; s0 = n_search; r0 = n_readout;
      // steps 1-3: alternating words, then inverted stored data
      for (int inv = 0; inv < 2; inv++) begin
        for (int a = 0; a < N; a++) write_t(a, (((a % 2) ^ inv) != 0) ? '1 : '0, '1);
        for (int b = 0; b < L; b++) begin
          search_t(L'(1) << b, '1, $sformatf("inter 2a bit %0d", b), nm);
          `CHECK(nm == 0, "inter 2a: no address expected")
          search_t(~(L'(1) << b), '1, $sformatf("inter 2a inv bit %0d", b), nm);
          `CHECK(nm == 0, "inter 2a inverted: no address expected")
        end
        search_t('0, '1, "inter 2b zeros", nm);
        `CHECK(nm == N / 2, "inter 2b zeros: half the words")
        search_t('1, '1, "inter 2b ones", nm);
        `CHECK(nm == N / 2, "inter 2b ones: half the words")
      end
      // steps 4-6: all zeros, then inverted stored and search data
      for (int inv = 0; inv < 2; inv++) begin
        for (int a = 0; a < N; a++) write_t(a, (inv != 0) ? '1 : '0, '1);
        for (int b = 0; b < L; b++) begin
          search_t((inv != 0) ? ~(L'(1) << b) : (L'(1) << b), '1, $sformatf("inter 5a bit %0d", b), nm);
          `CHECK(nm == 0, "inter 5a: no address expected")
        end
        search_t((inv != 0) ? '1 : '0, '1, "inter 5b", nm);
        `CHECK(nm == N, "inter 5b: every word")
      end
      `CHECK(n_write - w0 == 4 * N, "inter-cell writes = 4n")
      // 6l walking-bit searches plus the six all-0/all-1 searches whose results
      // are counted as returned addresses
      `CHECK(n_search - s0 == 6 * L + 6, "inter-cell searches = 6l + 6")
      `CHECK(n_readout - r0 == 4 * N, "inter-cell returned addresses = 4n")
    end

    // ---- 6. reads, masked entries, multiple and no matches ---------------
    for (int t = 0; t < 200; t++) begin
      int a;
      logic [L-1:0] v, c;
      a = $urandom % N;
      v = L'({5{32'($urandom)}});
      c = (t % 2 != 0) ? '1 : ~(L'(1) << ($urandom % L));
      write_t(a, v, c);
    end
    for (int a = 0; a < N; a += 7) begin
      logic [L-1:0] e1, e2;
      int cyc;
      for (int i = 0; i < L; i++) {e1[i], e2[i]} = tcam_pkg::tern(ref_v[a][i], ref_c[a][i]);
      run_cmd(tcam_pkg::OP_READ, a, '0, '0, cyc);
      `CHECK(rd_q1 == e1 && rd_q2 == e2 && cyc == 2, $sformatf("read %0d", a))
      n_read++;
    end
    for (int t = 0; t < 100; t++) begin
      int a;
      logic [L-1:0] kc;
      a = $urandom % N;
      kc = (t % 3 == 0) ? '0 : (t % 3 == 1) ? '1 : L'({5{32'($urandom)}});
      search_t(ref_v[a] ^ ((t % 7 == 0) ? L'(1) : '0), kc, $sformatf("random search %0d", t), nm);
    end

    $display("shifts=%0d writes=%0d searches=%0d readouts=%0d", n_shift, n_write, n_search, n_readout);
    $display("mechanisms: encoder=%0d node=%0d full=%0d capture=%0d par_shift=%0d ser_shift=%0d multi=%0d nomatch=%0d pregate=%0d read=%0d",
             m_mae, m_node, m_full, m_capture, m_par_shift, m_ser_shift, m_multi, m_nomatch, m_pregate, n_read);
    `CHECK(m_mae > 0, "encoder test never ran")
    `CHECK(m_node > 0, "node test never ran")
    `CHECK(m_full > 0, "full-tree test never ran")
    `CHECK(m_capture > 0, "scan chain b never captured")
    `CHECK(m_par_shift > 0, "scan chain a never shifted in parallel mode")
    `CHECK(m_ser_shift > 0, "scan chain a never shifted in serial mode")
    `CHECK(m_multi > 0, "no search with multiple matches")
    `CHECK(m_nomatch > 0, "no search without a match")
    `CHECK(m_pregate > 0, "pre-search never blocked a main search")
    `CHECK(n_read > 0, "no read")
    `TB_DONE
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
