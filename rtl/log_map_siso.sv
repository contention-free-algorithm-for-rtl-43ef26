// log_map_siso: sliding-window log-MAP soft-in/soft-out decoder for one
// sub-block of the parallel turbo decoder.
//
// The sub-block (at most NWIN*SW trellis steps) is processed in windows of
// SW steps by three recursion units working on three different windows at
// once, as in the classic sliding-window schedule:
//   slot s, cycle k (offset o = SW-1-k):
//   - input:  the symbol of window s, offset o, arrives (each window is
//             delivered back to front) and is written into sliding-window
//             memory s%2 at address o. The dummy-backward unit runs on it
//             directly, starting from equal metrics; its result at the end of
//             the slot is the initial beta of window s-1.
//   - forward unit: reads window s-1 from memory (s-1)%2 at address k,
//             stores alpha (before the step) into state-metric memory
//             (s-1)%2 and advances alpha.
//   - backward unit: reads window s-2 from memory (s-2)%2 at address o
//             (the same word the input is overwriting this cycle: the read
//             happens first, "write after read"), reads the stored alpha,
//             computes the LLR and steps beta back.
// Branch metrics are recomputed from the stored received values and
// intrinsic value by a BMC placed after the memories (three BMCs, one per
// unit), so the sliding-window memories hold (Li, ys, yp1..3) rather than
// branch metrics. A run lasts (NWIN+2)*SW cycles plus the LLR pipeline.
//
// Positions with in_valid=0 (beyond the end of a short sub-block) leave all
// metrics unchanged and produce no output, so a shorter last window needs no
// special schedule. Sub-block boundaries: alpha_init is used at the first
// step, beta_init at the end of the last window; alpha_end and beta_start
// return the boundary metrics so that neighbouring decoders can use them in
// the next iteration. These boundary rules and the tag that travels with
// each symbol (it carries the memory bank and address of the extrinsic
// value) are this design's choices.
//
// Timing: 'start' is a one-cycle pulse; the first input symbol is taken in
// the following cycle and one symbol per cycle after that for NWIN*SW
// cycles. Outputs (LLR, extrinsic = LLR - Li - Lc*ys saturated to 6 bits,
// hard decision LLR>0) appear 2*SW+4 cycles after their symbol's backward
// step starts, in back-to-front order within each window. 'done' pulses once
// when all outputs have been delivered.
module log_map_siso
  import turbo_pkg::*;
#(
  parameter int SW     = 32,  // sliding-window length
  parameter int NWIN   = 4,   // windows per sub-block
  parameter int TAGW   = 8,   // width of the tag carried with each symbol
  parameter bit LOGMAP = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [W_LC-1:0] lc,
  input  logic [2:0]      en,
  input  logic            in_valid,
  input  y_t              in_ys,
  input  y_t              in_yp [3],
  input  ex_t             in_li,
  input  logic [TAGW-1:0] in_tag,
  input  sm_t             alpha_init [NSTATE],
  input  sm_t             beta_init  [NSTATE],
  output logic            out_valid,
  output logic [TAGW-1:0] out_tag,
  output ex_t             out_ext,
  output llr_t            out_llr,
  output logic            out_dec,
  output sm_t             alpha_end  [NSTATE],
  output sm_t             beta_start [NSTATE],
  output logic            busy,
  output logic            done
);

  localparam int KW   = (SW > 1) ? $clog2(SW) : 1;
  localparam int SLW  = $clog2(NWIN + 3);
  localparam int LLAT = 3;

  typedef struct packed {
    logic            valid;
    y_t              ys;
    y_t              yp0, yp1, yp2;
    ex_t             li;
    logic [TAGW-1:0] tag;
  } sym_t;

  typedef logic [NSTATE*W_SM-1:0] smp_t;

  function automatic smp_t pack_sm(input sm_t v [NSTATE]);
    smp_t r;
    for (int i = 0; i < NSTATE; i++) r[i*W_SM +: W_SM] = v[i];
    return r;
  endfunction

  sym_t swm [2][SW];
  smp_t smm [2][SW];

  logic           run, drain;
  logic [SLW-1:0] slot;
  logic [KW-1:0]  k, o;
  logic [2:0]     dcnt;

  assign o = KW'(SW - 1) - k;

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; drain <= 1'b0; slot <= '0; k <= '0; dcnt <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        run <= 1'b1; drain <= 1'b0; slot <= '0; k <= '0;
      end else if (run) begin
        if (k == KW'(SW - 1)) begin
          k <= '0;
          if (slot == SLW'(NWIN + 1)) begin
            run <= 1'b0; drain <= 1'b1; dcnt <= '0;
          end else slot <= slot + 1'b1;
        end else k <= k + 1'b1;
      end else if (drain) begin
        dcnt <= dcnt + 1'b1;
        if (dcnt == 3'(LLAT)) begin
          drain <= 1'b0; done <= 1'b1;
        end
      end
    end
  end
  assign busy = run | drain;

  logic in_act, db_act, fp_act, bp_act;
  logic fw, bw;  // memory bank of the forward / backward window
  assign in_act = run && (slot < SLW'(NWIN));
  assign db_act = in_act && (slot >= SLW'(1));
  assign fp_act = run && (slot >= SLW'(1)) && (slot <= SLW'(NWIN));
  assign bp_act = run && (slot >= SLW'(2));
  assign fw = slot[0] ^ 1'b1;   // (slot-1) % 2
  assign bw = slot[0];          // (slot-2) % 2

  sym_t isym, fsym, bsym;
  always_comb begin
    isym = '{valid: in_valid && in_act, ys: in_ys, yp0: in_yp[0], yp1: in_yp[1], yp2: in_yp[2],
             li: in_li, tag: in_tag};
    fsym = swm[fw][k];
    bsym = swm[bw][o];
  end

  // ---------------- branch metrics ----------------
  bm_t g_db [NSTATE], g_fp [NSTATE], g_bp [NSTATE];
  logic signed [7:0] a_db, a_fp, a_bp;
  y_t fyp [3], byp [3];
  assign fyp = '{fsym.yp0, fsym.yp1, fsym.yp2};
  assign byp = '{bsym.yp0, bsym.yp1, bsym.yp2};

  bmc u_bmc_db (.ys(in_ys),   .yp(in_yp), .li(in_li),   .lc(lc), .en(en), .gamma(g_db), .apri(a_db));
  bmc u_bmc_fp (.ys(fsym.ys), .yp(fyp),   .li(fsym.li), .lc(lc), .en(en), .gamma(g_fp), .apri(a_fp));
  bmc u_bmc_bp (.ys(bsym.ys), .yp(byp),   .li(bsym.li), .lc(lc), .en(en), .gamma(g_bp), .apri(a_bp));

  // ---------------- recursions ----------------
  sm_t zero_sm [NSTATE];
  sm_t db_q [NSTATE], db_cur [NSTATE], db_step [NSTATE], db_nxt [NSTATE], db_init [NSTATE];
  sm_t a_q  [NSTATE], a_cur  [NSTATE], a_step  [NSTATE], a_nxt  [NSTATE];
  sm_t b_q  [NSTATE], b_cur  [NSTATE], b_step  [NSTATE], b_nxt  [NSTATE];
  sm_t b_alpha [NSTATE];

  smc #(.LOGMAP(LOGMAP)) u_smc_db (.dir(1'b1), .sm_in(db_cur), .gamma(g_db), .sm_out(db_step));
  smc #(.LOGMAP(LOGMAP)) u_smc_fp (.dir(1'b0), .sm_in(a_cur),  .gamma(g_fp), .sm_out(a_step));
  smc #(.LOGMAP(LOGMAP)) u_smc_bp (.dir(1'b1), .sm_in(b_cur),  .gamma(g_bp), .sm_out(b_step));

  always_comb begin
    for (int i = 0; i < NSTATE; i++) begin
      zero_sm[i] = '0;
      db_cur[i]  = (k == '0) ? sm_t'(0) : db_q[i];
      a_cur[i]   = (slot == SLW'(1) && k == '0) ? alpha_init[i] : a_q[i];
      b_cur[i]   = (k != '0) ? b_q[i] :
                   (slot == SLW'(NWIN + 1)) ? beta_init[i] : db_init[i];
      b_alpha[i] = smm[bw][o][i*W_SM +: W_SM];
    end
  end

  always_comb begin
    db_nxt = isym.valid ? db_step : db_cur;
    a_nxt  = fsym.valid ? a_step  : a_cur;
    b_nxt  = bsym.valid ? b_step  : b_cur;
  end

  always_ff @(posedge clk) begin
    if (in_act) swm[slot[0]][o] <= isym;
    if (fp_act) smm[fw][k] <= pack_sm(a_cur);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      db_q <= zero_sm; db_init <= zero_sm; a_q <= zero_sm; b_q <= zero_sm;
      beta_start <= zero_sm;
    end else begin
      if (db_act) db_q <= db_nxt;
      if (db_act && k == KW'(SW - 1)) db_init <= db_nxt;
      if (fp_act) a_q <= a_nxt;
      if (bp_act) b_q <= b_nxt;
      if (bp_act && slot == SLW'(2) && k == KW'(SW - 1)) beta_start <= b_nxt;
    end
  end
  assign alpha_end = a_q;

  // ---------------- LLR and extrinsic ----------------
  logic l_valid;
  llr_t l_llr;
  llrc #(.LOGMAP(LOGMAP)) u_llrc (
    .clk, .rst_n, .in_valid(bp_act && bsym.valid), .alpha(b_alpha), .beta(b_cur), .gamma(g_bp),
    .out_valid(l_valid), .llr(l_llr));

  logic signed [7:0] apri_d [LLAT];
  logic [TAGW-1:0]   tag_d  [LLAT];
  always_ff @(posedge clk) begin
    apri_d[0] <= a_bp;
    tag_d[0]  <= bsym.tag;
    for (int i = 1; i < LLAT; i++) begin
      apri_d[i] <= apri_d[i-1];
      tag_d[i]  <= tag_d[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_tag <= '0; out_ext <= '0; out_llr <= '0; out_dec <= 1'b0;
    end else begin
      out_valid <= l_valid;
      out_tag   <= tag_d[LLAT-1];
      out_ext   <= ex_t'(sat_sym(int'(l_llr) - int'(apri_d[LLAT-1]), W_EX));
      out_llr   <= l_llr;
      out_dec   <= (l_llr > 0);
    end
  end

endmodule
