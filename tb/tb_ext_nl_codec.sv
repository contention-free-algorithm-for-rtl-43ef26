// Exhaustive test of the non-linear extrinsic codec. All 64 six-bit
// extrinsic values are mapped; the code must keep the sign and the
// magnitude level 0, 1, 2, 4, 8 or 16 (largest power of two not above the
// magnitude, 16 for 16 and more), and de-mapping the code must return that
// level with the original sign. All 16 codes are also de-mapped directly.
module tb_ext_nl_codec;
  import turbo_pkg::*;
  ex_t ex_in, ex_out;
  exq_t code_out, code_in;
  ext_nl_codec dut (.*);
  int checks = 0, failures = 0;

  function automatic int level(int m);
    if (m >= 16) return 16;
    if (m >= 8) return 8;
    if (m >= 4) return 4;
    if (m >= 2) return 2;
    return m;
  endfunction

  initial begin
    for (int v = -32; v < 32; v++) begin
      int m, e;
      m = (v < 0) ? -v : v;
      e = (v < 0) ? -level(m) : level(m);
      ex_in = ex_t'(v); #1;
      code_in = code_out; #1;
      checks++;
      if (int'(ex_out) != e) begin
        failures++; $display("value %0d: code %b -> %0d, expected %0d", v, code_out, ex_out, e);
      end
      checks++;
      if (code_out[3] != (e < 0)) failures++;
    end
    for (int c = 0; c < 16; c++) begin
      int l, e;
      l = c & 7;
      e = (l == 0) ? 0 : (l > 5) ? 16 : (1 << (l - 1));
      if (c >= 8) e = -e;
      code_in = exq_t'(c); #1;
      checks++;
      if (int'(ex_out) != e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
