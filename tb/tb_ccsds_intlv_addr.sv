// Unit test of the incremental CCSDS interleaver address generator. The
// reference is the closed-form permutation of the CCSDS turbo code
// (pi(s) = 2(t + 4c + 1) - m with t = (19i+1) mod 4, c = (p_q j + 21m) mod k2),
// evaluated independently for every s. Checked: the whole sequence for
// k2 = 223 (1784 bits) and 446, a short frame with k2 = 15 through the
// external k2 input, that the output is a permutation, that step = 0 holds
// the address, and that rewind returns to the address saved by mark.
module tb_ccsds_intlv_addr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] sel = '0;
  logic [11:0] k2_ext = '0;
  logic start = 0, step = 0, mark = 0, rewind = 0;
  logic [13:0] pi;
  ccsds_intlv_addr dut (.*);
  int checks = 0, failures = 0;

  function automatic int ref_pi(int s1, int k2);  // 1-based in and out
    int m, i, j, t, q, c;
    int pq [8] = '{31, 37, 43, 47, 53, 59, 61, 67};
    m = (s1 - 1) % 2;
    i = (s1 - 1) / (2 * k2);
    j = (s1 - 1) / 2 - i * k2;
    t = (19 * i + 1) % 4;
    q = t % 8 + 1;
    c = (pq[q-1] * j + 21 * m) % k2;
    return 2 * (t + c * 4 + 1) - m;
  endfunction

  task automatic sweep(int k2, logic [2:0] s);
    bit seen [16384];
    int k;
    k = 8 * k2;
    @(negedge clk); sel = s; k2_ext = 12'(k2); start = 1;
    @(negedge clk); start = 0;
    for (int n = 0; n < k; n++) begin
      checks++;
      if (int'(pi) != ref_pi(n + 1, k2) - 1) begin
        failures++;
        if (failures < 5) $display("k2 %0d s %0d: %0d expected %0d", k2, n, pi, ref_pi(n + 1, k2) - 1);
      end
      checks++;
      if (int'(pi) >= k || seen[pi]) failures++;
      seen[pi] = 1;
      step = 1; @(negedge clk); step = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    sweep(223, 3'd0);
    sweep(446, 3'd1);
    sweep(15, 3'd5);
    // hold, mark and rewind on the k2 = 223 sequence
    @(negedge clk); sel = 3'd0; start = 1;
    @(negedge clk); start = 0;
    repeat (500) begin step = 1; @(negedge clk); end
    step = 0; mark = 1; @(negedge clk); mark = 0;
    repeat (3) @(negedge clk);
    checks++; if (int'(pi) != ref_pi(501, 223) - 1) failures++;
    repeat (77) begin step = 1; @(negedge clk); end
    step = 0;
    checks++; if (int'(pi) != ref_pi(578, 223) - 1) failures++;
    rewind = 1; @(negedge clk); rewind = 0;
    checks++; if (int'(pi) != ref_pi(501, 223) - 1) failures++;
    step = 1; @(negedge clk); step = 0;
    checks++; if (int'(pi) != ref_pi(502, 223) - 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
