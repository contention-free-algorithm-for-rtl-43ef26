// Unit test of the branch-metric calculator with random inputs, random
// channel reliability and every parity-enable pattern. The reference
// scales each soft value by Lc (two fractional bits), saturates it to the
// branch-metric range, adds the a-priori value to the systematic term and
// forms gamma(c) = (sum of +/- terms chosen by the bits of c) / 2 for the
// 16 combinations c = {u, x1, x2, x3}; disabled parity streams contribute 0.
module tb_bmc;
  import turbo_pkg::*;
  y_t ys; y_t yp [3]; ex_t li;
  logic [W_LC-1:0] lc; logic [2:0] en;
  bm_t gamma [NSTATE];
  logic signed [7:0] apri;
  bmc dut (.*);
  int checks = 0, failures = 0;

  function automatic int sc(int y, int l);
    int v; v = (y * l) >>> 2;
    return (v > 31) ? 31 : (v < -31) ? -31 : v;
  endfunction

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int s, p [3], a;
      ys = y_t'($urandom); li = ex_t'($urandom); lc = W_LC'($urandom); en = 3'($urandom);
      for (int i = 0; i < 3; i++) yp[i] = y_t'($urandom);
      #1;
      s = sc(int'(ys), int'(lc));
      for (int i = 0; i < 3; i++) p[i] = en[i] ? sc(int'(yp[i]), int'(lc)) : 0;
      a = int'(li) + s;
      checks++; if (int'(apri) != a) failures++;
      for (int c = 0; c < NSTATE; c++) begin
        int v;
        v = (c[3] ? a : -a) + (c[2] ? p[0] : -p[0]) + (c[1] ? p[1] : -p[1]) + (c[0] ? p[2] : -p[2]);
        v = v >>> 1;
        if (v > 31) v = 31;
        if (v < -31) v = -31;
        checks++;
        if (int'(gamma[c]) != v) begin
          failures++;
          if (failures < 5) $display("ys %0d li %0d c %0d: %0d vs %0d", ys, li, c, gamma[c], v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
