// Testbench for tcam_word_cmp: random stored words and keys built from ternary
// digits (0, 1, X, and the unused code), checked against a digit-by-digit
// ternary comparison, including the pre-search gating of the main segment.
`include "tb/tb_check.svh"
module tb_tcam_word_cmp;
  localparam int unsigned L = 12, PRE = 4;
  int checks = 0, failures = 0;
  logic [L-1:0] bl1, bl2, sl1, sl2;
  logic pre_ml, ml;
  int n_match = 0, n_pre_fail = 0;

  tcam_word_cmp #(.WORD_BITS(L), .PRE_BITS(PRE)) dut (.*);

  // 0:'0', 1:'1', 2:'X', 3:unused
  function automatic logic [1:0] code(int d);
    case (d) 0: return 2'b01; 1: return 2'b10; 2: return 2'b00; default: return 2'b11; endcase
  endfunction
  // Does one stored digit mismatch one searched digit?
  function automatic bit miss(int st, int sr);
    if (st == 2 || sr == 2) return 0;
    if (st == 3 || sr == 3) return 1;  // the unused code conducts on any driven line
    return st != sr;
  endfunction

  initial begin
    int st[L], sr[L];
    bit exp_pre, exp_main;
    for (int t = 0; t < 4000; t++) begin
      for (int i = 0; i < L; i++) begin
        st[i] = ($urandom % 16 == 0) ? 3 : $urandom % 3;
        // mostly equal digits so that matches happen
        sr[i] = ($urandom % 8 == 0) ? $urandom % 3 : (st[i] == 3 ? 2 : st[i]);
        {bl1[i], bl2[i]} = code(st[i]);
        {sl1[i], sl2[i]} = code(sr[i]);
      end
      #1;
      exp_pre = 1; exp_main = 1;
      for (int i = 0; i < L; i++) begin
        if (miss(st[i], sr[i])) begin
          if (i < PRE) exp_pre = 0; else exp_main = 0;
        end
      end
      `CHECK(pre_ml == exp_pre, $sformatf("pre_ml t=%0d", t))
      `CHECK(ml == (exp_pre && exp_main), $sformatf("ml t=%0d", t))
      if (exp_pre && exp_main) n_match++;
      if (!exp_pre && exp_main) n_pre_fail++;
    end
    `CHECK(n_match > 50, "too few matching vectors")
    `CHECK(n_pre_fail > 20, "pre-search-only mismatch never exercised")
    `TB_DONE
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
