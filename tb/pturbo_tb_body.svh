// Shared body of the end-to-end decoder testbenches. The including module
// defines TB_P, TB_FRAME, TB_SW, TB_ITER and instantiates 'dut'.
//
// The testbench works out everything it needs independently of the design:
//   - the CCSDS permutation pi from its closed formula;
//   - a contention-free bank map C: positions are edges of a P-regular
//     bipartite graph (natural column x mod W, interleaved column of the
//     index y with pi(y) = x); a proper P-edge-colouring (alternating-path
//     method) gives banks that never collide in either order;
//   - the CCSDS rate-1/3 encoding of random frames (behavioural model);
//   - a channel with bounded noise and a few flipped systematic values.
// Two frames are decoded back to back from the two input-buffer pages (the
// second is loaded while the first is decoded). Every position must be
// output once, and the decoded frame must contain at most a third of the
// systematic sign errors the channel introduced. Counters show that each
// mechanism (temporary buffer, drain, interleaved halves, empty positions,
// top extrinsic level, page swap, boundary metrics) was exercised.

  localparam int W    = (TB_FRAME + TB_P - 1) / TB_P;
  localparam int NPOS = TB_P * W;
  localparam int K2   = TB_FRAME / 8;

  int checks = 0, failures = 0;
  int pi_tab [NPOS];
  int col    [NPOS];
  int lcol   [W][TB_P], rcol [W][TB_P];   // edge at (vertex, colour) or -1
  int rcol_of[NPOS];                      // right vertex of edge x
  bit info   [2][TB_FRAME];
  int n_flip = 0, n_bufwr = 0, n_drain = 0, n_inthalf = 0, n_invalid = 0, n_sat = 0;
  int n_pageswap = 0, n_bnd = 0, cyc = 0;
  int raw_err [2];                        // wrong or zero systematic signs per frame

  function automatic int ccsds_pi(int s1);  // s1 = 1..k, returns 1-based pi
    int m, i, j, t, q, c;
    int pq [8] = '{31, 37, 43, 47, 53, 59, 61, 67};
    m = (s1 - 1) % 2;
    i = (s1 - 1) / (2 * K2);
    j = (s1 - 1) / 2 - i * K2;
    t = (19 * i + 1) % 4;
    q = t % 8 + 1;
    c = (pq[q-1] * j + 21 * m) % K2;
    return 2 * (t + c * 4 + 1) - m;
  endfunction

  task automatic build_map();
    int e, u, v, a, b, cur, ccol, plen;
    int path [NPOS];
    for (int y = 0; y < NPOS; y++) pi_tab[y] = (y < TB_FRAME) ? ccsds_pi(y + 1) - 1 : y;
    for (int y = 0; y < NPOS; y++) rcol_of[pi_tab[y]] = y % W;
    for (int j = 0; j < W; j++) for (int c = 0; c < TB_P; c++) begin lcol[j][c] = -1; rcol[j][c] = -1; end
    for (e = 0; e < NPOS; e++) begin
      u = e % W; v = rcol_of[e];
      a = -1; b = -1;
      for (int c = TB_P - 1; c >= 0; c--) begin
        if (lcol[u][c] < 0) a = c;
        if (rcol[v][c] < 0) b = c;
      end
      if (rcol[v][a] >= 0) begin
        // flip the a/b alternating path that starts at v with colour a
        plen = 0; cur = v; ccol = a;
        forever begin
          if (ccol == a) begin
            if (rcol[cur][a] < 0) break;
            path[plen++] = rcol[cur][a];
            cur = rcol[cur][a] % W;       // left vertex
            ccol = b;
          end else begin
            if (lcol[cur][b] < 0) break;
            path[plen++] = lcol[cur][b];
            cur = rcol_of[lcol[cur][b]];  // right vertex
            ccol = a;
          end
        end
        for (int k = 0; k < plen; k++) begin
          lcol[path[k] % W][col[path[k]]] = -1; rcol[rcol_of[path[k]]][col[path[k]]] = -1;
        end
        for (int k = 0; k < plen; k++) begin
          col[path[k]] = (col[path[k]] == a) ? b : a;
          lcol[path[k] % W][col[path[k]]] = path[k]; rcol[rcol_of[path[k]]][col[path[k]]] = path[k];
        end
      end
      col[e] = a; lcol[u][a] = e; rcol[v][a] = e;
    end
  endtask

  function automatic void rsc(input bit s [4], input bit u, output bit ns [4], output bit p [3]);
    bit a;
    a = u ^ s[2] ^ s[3];                       // feedback 1+D^3+D^4
    p[0] = a ^ s[0] ^ s[2] ^ s[3];             // 1+D+D^3+D^4
    p[1] = a ^ s[1] ^ s[3];                    // 1+D^2+D^4
    p[2] = a ^ s[0] ^ s[1] ^ s[2] ^ s[3];      // 1+D+D^2+D^3+D^4
    ns = '{a, s[0], s[1], s[2]};
  endfunction

  function automatic int chan(bit b);
    int v;
    v = (b ? 4 : -4) + int'($urandom_range(8)) - 4;
    return v;
  endfunction

  task automatic load_frame(int f, bit page);
    bit sa [4], sb [4], ns [4], pa [3], pb [3];
    sa = '{0, 0, 0, 0}; sb = '{0, 0, 0, 0};
    raw_err[f] = 0;
    for (int k = 0; k < TB_FRAME; k++) info[f][k] = 1'($urandom_range(1));
    for (int k = 0; k < TB_FRAME; k++) begin
      int ys;
      rsc(sa, info[f][k], ns, pa); sa = ns;
      rsc(sb, info[f][pi_tab[k]], ns, pb); sb = ns;
      ys = chan(info[f][k]);
      if ($urandom_range(99) < 3) begin ys = -ys; n_flip++; end
      if (ys == 0 || ((ys > 0) != info[f][k])) raw_err[f]++;
      @(negedge clk);
      ld_en = 1; ld_page = page; ld_pos = 14'(k); ld_ys = y_t'(ys);
      for (int i = 0; i < 3; i++) begin ld_pa[i] = y_t'(chan(pa[i])); ld_pb[i] = y_t'(chan(pb[i])); end
    end
    @(negedge clk); ld_en = 0;
  endtask

  int got [TB_FRAME];
  int errs;

  task automatic run_frame(int f, bit page, bit load_other);
    int nout;
    @(negedge clk); go = 1; dec_page = page; @(negedge clk); go = 0;
    if (load_other) begin load_frame(1, !page); n_pageswap++; end
    nout = 0; errs = 0;
    while (nout < TB_FRAME) begin
      @(posedge clk);
      if (out_valid) begin
        if (out_bit !== info[f][out_pos]) errs++;
        nout++;
      end
    end
    $display("frame %0d: %0d bit errors of %0d after decoding, %0d before", f, errs, TB_FRAME, raw_err[f]);
    // The frames are short and carry no tail, so a residual error or two is
    // normal; the decoder must at least remove most channel errors.
    checks++;
    if (errs * 3 > raw_err[f] || raw_err[f] == 0) begin failures++; $display("insufficient correction"); end
    checks++;
    if (nout != TB_FRAME) failures++;
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dut.ext_bufwr) n_bufwr++;
    if (rst_n && dut.ext_drain) n_drain++;
    if (int'(dut.st) == 2 && dut.fk == 0) n_inthalf++;
    if (dut.f1_act && !dut.f1_valid[TB_P-1]) n_invalid++;
    if (dut.s_oval[0] && dut.w_code[0][2:0] == 3'd5) n_sat++;
    if (dut.siso_done && !dut.first_iter) n_bnd++;
  end

  initial begin
    ld_en = 0; ld_page = 0; ld_pos = 0; ld_ys = 0; go = 0; dec_page = 0; rate = 2'd1; lc = 4'd4;
    map_ld_en = 0; map_ld_int = 0; map_ld_t = 0; map_ld_j = 0; map_ld_bank = 0;
    for (int i = 0; i < 3; i++) begin ld_pa[i] = 0; ld_pb[i] = 0; end
    rst_n = 0;
    build_map();
    // the map must be contention free in both orders
    for (int j = 0; j < W; j++) begin
      bit [TB_P-1:0] un, ui;
      un = '0; ui = '0;
      for (int t = 0; t < TB_P; t++) begin un[col[t*W+j]] = 1; ui[col[pi_tab[t*W+j]]] = 1; end
      checks++; if (!(&un) || !(&ui)) failures++;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < TB_P; t++) for (int j = 0; j < W; j++) begin
      @(negedge clk); map_ld_en = 1; map_ld_int = 0; map_ld_t = $bits(map_ld_t)'(t); map_ld_j = $bits(map_ld_j)'(j);
      map_ld_bank = $bits(map_ld_bank)'(col[t*W+j]);
      @(negedge clk); map_ld_int = 1; map_ld_bank = $bits(map_ld_bank)'(col[pi_tab[t*W+j]]);
    end
    @(negedge clk); map_ld_en = 0;
    load_frame(0, 0);
    wait (ready);
    run_frame(0, 0, 1);
    wait (ready);
    run_frame(1, 1, 0);
    checks++; if (err_conflict) begin failures++; $display("bank conflict"); end
    checks++; if (err_ovf) begin failures++; $display("temporary buffer overflow"); end
    $display("mechanisms: flipped=%0d buffered_writes=%0d drains=%0d interleaved_halves=%0d invalid_slots=%0d sat_codes=%0d page_swaps=%0d boundary_exchanges=%0d cycles=%0d",
             n_flip, n_bufwr, n_drain, n_inthalf, n_invalid, n_sat, n_pageswap, n_bnd, cyc);
    checks++; if (n_flip == 0)    begin failures++; $display("no channel errors injected"); end
    if ((W + TB_SW - 1) / TB_SW > 2) begin
      checks++; if (n_bufwr == 0) begin failures++; $display("temporary buffer never used"); end
      checks++; if (n_drain == 0) begin failures++; $display("buffer never drained"); end
    end else begin
      // two windows per sub-block: reads end before the first write, so the
      // temporary buffer must stay unused
      checks++; if (n_bufwr != 0 || n_drain != 0) begin failures++; $display("unexpected buffer use"); end
    end
    checks++; if (n_inthalf != 2 * TB_ITER) begin failures++; $display("interleaved halves %0d", n_inthalf); end
    checks++; if (n_sat == 0)     begin failures++; $display("mapping never reached top level"); end
    checks++; if (n_pageswap == 0) begin failures++; end
    checks++; if (n_bnd == 0)     begin failures++; $display("no boundary exchange"); end
    if (TB_P * W != TB_FRAME || W % TB_SW != 0) begin
      checks++; if (n_invalid == 0) begin failures++; $display("no invalid positions seen"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
