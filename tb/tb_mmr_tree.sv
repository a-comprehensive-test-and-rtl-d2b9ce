// Testbench for mmr_tree at 256 inputs of 16-input nodes: connected tree with
// random sparse match vectors (highest-priority = lowest index wins, MMD when
// two or more), scan-chain inputs through Mux-1, and node-test mode where
// every node resolves its own inputs independently.
`include "tb/tb_check.svh"
module tb_mmr_tree;
  localparam int unsigned N = 256, P = 16, T = 272;
  int checks = 0, failures = 0;
  logic [N-1:0] ml_in, grant;
  logic [T-1:0] sca, grant_all;
  logic mux1_sel, node_test, enable, match_found, mmd;
  mmr_tree #(.N_WORDS(N), .P(P)) dut (.*);

  function automatic logic [N-1:0] lowest(logic [N-1:0] v);
    for (int i = 0; i < N; i++) if (v[i]) return N'(1) << i;
    return '0;
  endfunction

  initial begin
    enable = 1;
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] v;
      int k;
      v = '0;
      k = $urandom % 4;
      for (int i = 0; i < k; i++) v[$urandom % N] = 1'b1;
      mux1_sel = t[0];
      node_test = 0;
      ml_in = mux1_sel ? N'($urandom) : v;
      sca = {16'($urandom), mux1_sel ? v : N'($urandom)};
      #1;
      `CHECK(grant == lowest(v), $sformatf("t=%0d grant", t))
      `CHECK(match_found == (v != 0), $sformatf("t=%0d mf", t))
      `CHECK(mmd == ($countones(v) > 1), $sformatf("t=%0d mmd", t))
      `CHECK(grant_all[T-1:N] == ((v == 0) ? 16'h0 : 16'(1) << (($clog2(lowest(v)+1)-1) / P)),
             $sformatf("t=%0d L2 enables", t))
    end
    // node test: all 17 nodes cut apart and fed from scan chain a
    for (int t = 0; t < 500; t++) begin
      logic [T-1:0] s, e;
      s = {T{1'b0}};
      for (int i = 0; i < T; i++) s[i] = ($urandom % 8 == 0);
      mux1_sel = 1; node_test = 1; sca = s; ml_in = N'($urandom);
      #1;
      for (int j = 0; j < T / P; j++) begin
        logic [P-1:0] seg, g;
        seg = s[j*P +: P];
        g = '0;
        for (int b = P - 1; b >= 0; b--) if (seg[b]) g = P'(1) << b;
        e[j*P +: P] = g;
      end
      `CHECK(grant_all == e, $sformatf("node test %0d", t))
    end
    // disabled top node passes nothing
    enable = 0; node_test = 0; mux1_sel = 0; ml_in = N'(1) << 77;
    #1;
    `CHECK(grant == '0 && match_found, "top enable low")
    `TB_DONE
  end
  initial begin
    #1000000; failures++; $display("watchdog expired"); `TB_DONE
  end
endmodule
