// Testbench for tcam_array: random ternary words are written to a small array
// and read back; random keys (some copied from stored words, some with masked
// bits) are searched and every match line is compared with a reference
// computed word by word in the testbench.
`include "tb/tb_check.svh"
module tb_tcam_array;
  localparam int unsigned N = 16, L = 12, PRE = 4, AW = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0, re = 0;
  logic [AW-1:0] addr = '0;
  logic [L-1:0] d1 = '0, d2 = '0, q1, q2, s1 = '0, s2 = '0;
  logic [N-1:0] pre_ml, ml;
  logic [L-1:0] ref_v [N];   // reference: value bits
  logic [L-1:0] ref_c [N];   // reference: care bits
  int n_hits = 0, n_multi = 0;

  tcam_array #(.N_WORDS(N), .WORD_BITS(L), .PRE_BITS(PRE)) dut (.*);
  always #5 clk = ~clk;

  task automatic write_word(int a, logic [L-1:0] v, logic [L-1:0] c);
    @(negedge clk);
    addr = AW'(a); we = 1;
    for (int i = 0; i < L; i++) {d1[i], d2[i]} = tcam_pkg::tern(v[i], c[i]);
    @(negedge clk);
    we = 0;
    ref_v[a] = v; ref_c[a] = c;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // After reset every cell is X: reads return 0 and an all-X key... any key matches.
    @(negedge clk);
    s1 = L'($urandom); s2 = ~s1;
    #1;
    `CHECK(ml == '1, "reset contents must match every key")
    for (int a = 0; a < N; a++) write_word(a, L'($urandom), L'($urandom | $urandom));
    // read back
    for (int a = 0; a < N; a++) begin
      logic [L-1:0] e1, e2;
      @(negedge clk);
      addr = AW'(a); re = 1;
      for (int i = 0; i < L; i++) {e1[i], e2[i]} = tcam_pkg::tern(ref_v[a][i], ref_c[a][i]);
      #1;
      `CHECK(q1 == e1 && q2 == e2, $sformatf("read %0d", a))
      re = 0;
    end
    // searches
    for (int t = 0; t < 600; t++) begin
      logic [L-1:0] kv, kc;
      logic [N-1:0] exp_ml, exp_pre;
      int src;
      @(negedge clk);
      src = $urandom % N;
      kv = (t % 3 == 0) ? L'($urandom) : ref_v[src] ^ ((t % 5 == 0) ? L'(1 << ($urandom % L)) : '0);
      kc = (t % 2 == 0) ? '1 : L'($urandom);
      for (int i = 0; i < L; i++) {s1[i], s2[i]} = tcam_pkg::tern(kv[i], kc[i]);
      if (t % 50 == 7) begin
        // occasionally rewrite one word to the key itself
        write_word(src, kv, kc);
        for (int i = 0; i < L; i++) {s1[i], s2[i]} = tcam_pkg::tern(kv[i], kc[i]);
      end
      #1;
      for (int w = 0; w < N; w++) begin
        logic [L-1:0] diff;
        diff = (ref_v[w] ^ kv) & ref_c[w] & kc;
        exp_pre[w] = ~|diff[PRE-1:0];
        exp_ml[w]  = ~|diff;
      end
      `CHECK(ml == exp_ml, $sformatf("search %0d ml %h exp %h", t, ml, exp_ml))
      `CHECK(pre_ml == exp_pre, $sformatf("search %0d pre", t))
      if (ml != 0) n_hits++;
      if ($countones(ml) > 1) n_multi++;
    end
    `CHECK(n_hits > 100, "too few searches with a match")
    `CHECK(n_multi > 10, "too few searches with several matches")
    `TB_DONE
  end
  initial begin
    #200000; failures++; $display("watchdog expired"); `TB_DONE
  end
endmodule
