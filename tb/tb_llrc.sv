// Unit test of the LLR calculator. Random forward metrics, backward metrics
// and branch metrics are applied one set per cycle; a reference computes
//   L = max*_{u=1}(alpha + gamma + beta') - max*_{u=0}(alpha + gamma + beta')
// with its own shift-register model of the trellis and the same pairwise
// reduction tree, and the result is compared three cycles later. Gaps in
// in_valid check that out_valid follows the three-cycle latency.
module tb_llrc;
  import turbo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  sm_t alpha [NSTATE], beta [NSTATE];
  bm_t gamma [NSTATE];
  llr_t llr;
  llrc dut (.*);

  int checks = 0, failures = 0;
  int expq [$];
  bit vq [$];

  function automatic int corr(int d);
    int a; a = d < 0 ? -d : d;
    return (a == 0) ? 3 : (a < 4) ? 2 : (a < 9) ? 1 : 0;
  endfunction
  function automatic int mstar(int a, int b);
    return ((a > b) ? a : b) + corr(a - b);
  endfunction
  function automatic void branch(int s, int u, output int ns, output int combo);
    int d1, d2, d3, d4, a;
    d1 = (s >> 3) & 1; d2 = (s >> 2) & 1; d3 = (s >> 1) & 1; d4 = s & 1;
    a = u ^ d3 ^ d4;
    ns = (a << 3) | (d1 << 2) | (d2 << 1) | d3;
    combo = (u << 3) | ((a ^ d1 ^ d3 ^ d4) << 2) | ((a ^ d2 ^ d4) << 1) | (a ^ d1 ^ d2 ^ d3 ^ d4);
  endfunction
  function automatic int reference();
    int l [2][NSTATE];
    for (int u = 0; u < 2; u++) begin
      for (int s = 0; s < NSTATE; s++) begin
        int ns, c;
        branch(s, u, ns, c);
        l[u][s] = int'(alpha[s]) + int'(gamma[c]) + int'(beta[ns]);
      end
      for (int w = NSTATE / 2; w >= 1; w = w / 2)
        for (int k = 0; k < w; k++) l[u][k] = mstar(l[u][2*k], l[u][2*k+1]);
    end
    return l[1][0] - l[0][0];
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 600; it++) begin
      @(negedge clk);
      // compare the result of the set applied three cycles ago
      if (vq.size() == 3) begin
        bit v; int e;
        v = vq.pop_front(); e = expq.pop_front();
        checks++;
        if (out_valid !== v) failures++;
        if (v) begin
          checks++;
          if (int'(llr) != e) begin
            failures++;
            if (failures < 5) $display("it %0d: llr %0d expected %0d", it, llr, e);
          end
        end
      end
      in_valid = ($urandom_range(3) != 0);
      for (int s = 0; s < NSTATE; s++) begin
        alpha[s] = sm_t'(-int'($urandom_range(256)));
        beta[s]  = sm_t'(-int'($urandom_range(256)));
        gamma[s] = bm_t'(int'($urandom_range(62)) - 31);
      end
      #1;
      vq.push_back(in_valid); expq.push_back(reference());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
