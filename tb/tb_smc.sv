// Unit test of one state-metric recursion step. The reference uses its own
// shift-register model of the constituent encoder to enumerate branches,
// applies max* with the correction table ln(1+e^-|d|) (quarter units:
// d=0 -> 3, d<1 -> 2, d<2.25 -> 1, else 0), rescales by the maximum and
// saturates at -256. Random metrics and branch metrics, both directions.
module tb_smc;
  import turbo_pkg::*;
  logic dir;
  sm_t sm_in [NSTATE], sm_out [NSTATE];
  bm_t gamma [NSTATE];
  smc dut (.*);

  int checks = 0, failures = 0;

  function automatic int corr(int d);
    int a; a = d < 0 ? -d : d;
    return (a == 0) ? 3 : (a < 4) ? 2 : (a < 9) ? 1 : 0;
  endfunction
  function automatic int mstar(int a, int b);
    return ((a > b) ? a : b) + corr(a - b);
  endfunction

  // branch of state s = {d1,d2,d3,d4} (d1 = bit 3) with input u
  function automatic void branch(int s, int u, output int ns, output int combo);
    int d1, d2, d3, d4, a, p1, p2, p3;
    d1 = (s >> 3) & 1; d2 = (s >> 2) & 1; d3 = (s >> 1) & 1; d4 = s & 1;
    a = u ^ d3 ^ d4;
    p1 = a ^ d1 ^ d3 ^ d4; p2 = a ^ d2 ^ d4; p3 = a ^ d1 ^ d2 ^ d3 ^ d4;
    ns = (a << 3) | (d1 << 2) | (d2 << 1) | d3;
    combo = (u << 3) | (p1 << 2) | (p2 << 1) | p3;
  endfunction

  initial begin
    int exp_m [NSTATE];
    bit have [NSTATE];
    int mx;
    for (int it = 0; it < 400; it++) begin
      dir = it[0];
      for (int s = 0; s < NSTATE; s++) begin
        sm_in[s] = sm_t'(-int'($urandom_range(200)));
        gamma[s] = bm_t'(int'($urandom_range(62)) - 31);
        have[s] = 0; exp_m[s] = 0;
      end
      for (int s = 0; s < NSTATE; s++)
        for (int u = 0; u < 2; u++) begin
          int ns, c, v, dst;
          branch(s, u, ns, c);
          v   = dir ? int'(sm_in[ns]) + int'(gamma[c]) : int'(sm_in[s]) + int'(gamma[c]);
          dst = dir ? s : ns;
          exp_m[dst] = have[dst] ? mstar(exp_m[dst], v) : v;
          have[dst] = 1;
        end
      mx = exp_m[0];
      for (int s = 1; s < NSTATE; s++) if (exp_m[s] > mx) mx = exp_m[s];
      #1;
      for (int s = 0; s < NSTATE; s++) begin
        int e;
        e = exp_m[s] - mx; if (e < -256) e = -256;
        checks++;
        if (int'(sm_out[s]) != e) begin
          failures++;
          if (failures < 5) $display("it %0d dir %0d state %0d: got %0d exp %0d", it, dir, s, sm_out[s], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
