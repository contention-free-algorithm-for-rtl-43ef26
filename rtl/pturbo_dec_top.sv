// pturbo_dec_top: P-parallel, memory-contention-free turbo decoder for the
// CCSDS turbo code (16-state constituent codes, on-line CCSDS interleaver).
//
// The frame of FRAME information bits is cut into P sub-blocks of
// W = ceil(FRAME/P) positions and each sub-block is decoded by its own
// sliding-window log-MAP SISO. All SISOs run in lock step, so in every cycle
// decoder t touches local index j of its sub-block. Extrinsic values (and the
// systematic received values, which the second decoder needs in interleaved
// order) live in P banks; position x is stored in bank C(x) at address
// x mod W, where the mapping C was chosen off line so that the P positions of
// one cycle always lie in P different banks, in natural order as well as in
// interleaved order. C is held in two look-up tables (natural and
// interleaved order), a crossbar routes the accesses, and the extrinsic
// banks are single-port RAMs helped by one temporary buffer (ext_mem_sp).
// Extrinsic values are stored as 4-bit non-linear codes.
//
// Operation
//   1. After reset the P interleaver generators are advanced to the start of
//      their sub-blocks (about FRAME cycles, once).
//   2. The mapping tables are loaded (map_ld_*), and a frame is loaded into
//      one page of the double input buffer, one received symbol per cycle
//      (ld_*; position x, ys, the three parities of each encoder, punctured
//      values given as 0).
//   3. 'go' decodes page 'dec_page' with ITER iterations (2*ITER half
//      iterations: even ones decode encoder a in natural order, odd ones
//      encoder b in interleaved order). Another page may be loaded meanwhile.
//   4. The hard decisions of the last half iteration are read out in natural
//      order: out_valid/out_pos/out_bit, one bit per cycle; 'frame_done'
//      pulses after the last one.
// Boundary state metrics between neighbouring sub-blocks are exchanged from
// one iteration to the next (zero in the first iteration); decoder 0 starts
// in state 0; the last sub-block ends with equal metrics (trellis
// termination bits are not processed). A half iteration takes about
// (NWIN+2)*SW + TD + 10 cycles (+SW for the interleaved half).
//
// What follows the published architecture: P lock-stepped sliding-window
// log-MAP SISOs, contention-free bank mapping from tables, single-port
// extrinsic banks with a temporary buffer, non-linear extrinsic mapping,
// on-line interleaver, double input buffer, hard-decision output buffer. The
// schedule, the boundary rules, the read-out and all handshakes are this
// design's own.
module pturbo_dec_top
  import turbo_pkg::*;
#(
  parameter int P      = 16,
  parameter int FRAME  = 1784,
  parameter int SW     = 32,
  parameter int ITER   = 8,
  parameter bit LOGMAP = 1'b1,
  localparam int W     = (FRAME + P - 1) / P,
  localparam int NWIN  = (W + SW - 1) / SW,
  localparam int TD    = (NWIN > 2) ? (NWIN - 2) * SW : 1,
  localparam int BW    = (P > 1) ? $clog2(P) : 1,
  localparam int JW    = (NWIN * SW > 1) ? $clog2(NWIN * SW) : 1,
  localparam int AW    = (W > 1) ? $clog2(W) : 1,
  localparam int XW    = $clog2(P * W + 1),
  localparam int PW    = 14
) (
  input  logic            clk,
  input  logic            rst_n,
  // mapping tables
  input  logic            map_ld_en,
  input  logic            map_ld_int,
  input  logic [BW-1:0]   map_ld_t,
  input  logic [AW-1:0]   map_ld_j,
  input  logic [BW-1:0]   map_ld_bank,
  // frame loading
  input  logic            ld_en,
  input  logic            ld_page,
  input  logic [PW-1:0]   ld_pos,
  input  y_t              ld_ys,
  input  y_t              ld_pa [3],
  input  y_t              ld_pb [3],
  // control
  input  logic            go,
  input  logic            dec_page,
  input  logic [1:0]      rate,
  input  logic [W_LC-1:0] lc,
  output logic            ready,      // interleaver initialised and idle
  output logic            busy,
  // decoded output
  output logic            out_valid,
  output logic [PW-1:0]   out_pos,
  output logic            out_bit,
  output logic            frame_done,
  // status
  output logic            err_conflict,
  output logic            err_ovf
);

  localparam int K2 = FRAME / 8;
  localparam logic [2:0] K2SEL = (K2 == 223) ? 3'd0 : (K2 == 446) ? 3'd1 : (K2 == 892) ? 3'd2 :
                                 (K2 == 1115) ? 3'd3 : (K2 == 2048) ? 3'd4 : 3'd5;
  localparam int TAGW = BW + AW;
  localparam int DW   = 1 + W_Q;   // {hard decision, extrinsic code}
  localparam int SLW  = $clog2(NWIN + 1);
  localparam int KW   = (SW > 1) ? $clog2(SW) : 1;

  function automatic logic [BW-1:0] div_w(input int x);
    int t;
    t = 0;
    for (int i = 1; i < P; i++) if (x >= i * W) t = i;
    return BW'(t);
  endfunction
  function automatic logic [AW-1:0] mod_w(input int x);
    return AW'(x - int'(div_w(x)) * W);
  endfunction

  // ------------------------------------------------------------------
  // mapping tables
  // ------------------------------------------------------------------
  logic          lut_rd_int;
  logic [AW-1:0] lut_rd_j    [P];
  logic [BW-1:0] lut_rd_bank [P];
  logic [BW-1:0] q_t, q_bank;
  logic [AW-1:0] q_j;

  bank_map_lut #(.P(P), .W(W)) u_lut (
    .clk, .ld_en(map_ld_en), .ld_int(map_ld_int), .ld_t(map_ld_t), .ld_j(map_ld_j), .ld_bank(map_ld_bank),
    .rd_int(lut_rd_int), .rd_j(lut_rd_j), .rd_bank(lut_rd_bank), .q_t, .q_j, .q_bank);

  // ------------------------------------------------------------------
  // frame loader: parity written at once, ys one cycle later (bank lookup)
  // ------------------------------------------------------------------
  logic          ldq_en, ldq_page;
  logic [AW-1:0] ldq_j;
  y_t            ldq_ys;

  assign q_t = div_w(int'(ld_pos));
  assign q_j = mod_w(int'(ld_pos));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ldq_en <= 1'b0; ldq_page <= 1'b0; ldq_j <= '0; ldq_ys <= '0;
    end else begin
      ldq_en <= ld_en; ldq_page <= ld_page; ldq_j <= q_j; ldq_ys <= ld_ys;
    end
  end

  logic          ib_rd_en;
  logic          cur_page;
  logic [AW-1:0] ys_rd_addr [P], par_rd_addr [P];
  y_t            ys_rd [P];
  y_t            pa_rd [P][3], pb_rd [P][3];

  // The ys write of the previous load and the parity write of the current
  // one use different ports, so a new symbol can be loaded every cycle.
  in_buf #(.P(P), .W(W)) u_inbuf (
    .clk,
    .ld_ys_en(ldq_en), .ld_ys_page(ldq_page), .ld_ys_bank(q_bank), .ld_ys_addr(ldq_j), .ld_ys(ldq_ys),
    .ld_par_en(ld_en), .ld_par_page(ld_page), .ld_par_bank(q_t), .ld_par_addr(q_j),
    .ld_pa, .ld_pb,
    .rd_page(cur_page), .rd_en(ib_rd_en), .ys_rd_addr, .ys_rd, .par_rd_addr, .pa_rd, .pb_rd);

  // ------------------------------------------------------------------
  // controller
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {S_INIT, S_IDLE, S_PRE, S_RUN, S_WAIT, S_OUT} st_e;
  st_e st;

  logic [$clog2(2*ITER+1)-1:0] half;
  logic                        dsel;       // 0: encoder a / natural, 1: encoder b / interleaved
  logic [XW-1:0]               init_cnt;
  logic [KW-1:0]               fk;
  logic [SLW-1:0]              fslot;
  logic                        feed;       // F0 stage active
  logic [PW-1:0]               ocnt;
  logic                        siso_done;
  logic                        ext_empty, ext_ovf, ext_bufwr, ext_drain;

  assign dsel = half[0];
  assign feed = (st == S_RUN) && (fslot < SLW'(NWIN));
  assign ready = (st == S_IDLE);
  assign busy  = (st != S_IDLE) && (st != S_INIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_INIT; half <= '0; init_cnt <= '0; fk <= '0; fslot <= '0; ocnt <= '0;
      cur_page <= 1'b0;
    end else begin
      unique case (st)
        S_INIT: begin
          init_cnt <= init_cnt + 1'b1;
          if (init_cnt == XW'((P - 1) * W)) st <= S_IDLE;
        end
        S_IDLE: if (go) begin
          cur_page <= dec_page; half <= '0; fk <= '0; fslot <= '0;
          st <= S_RUN;
        end
        S_PRE: begin
          fk <= fk + 1'b1;
          if (fk == KW'(SW - 1)) begin fk <= '0; st <= S_RUN; end
        end
        S_RUN: begin
          if (feed) begin
            fk <= fk + 1'b1;
            if (fk == KW'(SW - 1)) begin fk <= '0; fslot <= fslot + 1'b1; end
          end
          if (siso_done) st <= S_WAIT;
        end
        S_WAIT: if (ext_empty) begin
          fk <= '0; fslot <= '0;
          if (half == ($bits(half))'(2 * ITER - 1)) begin
            st <= S_OUT; ocnt <= '0;
          end else begin
            half <= half + 1'b1;
            st   <= half[0] ? S_RUN : S_PRE;   // next half is interleaved when current is natural
          end
        end
        S_OUT: begin
          ocnt <= ocnt + 1'b1;
          if (ocnt == PW'(FRAME - 1)) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // interleaver generators and per-decoder address reversal buffers
  // ------------------------------------------------------------------
  logic          gen_start, gen_mark, gen_rewind;
  logic          gen_wr;
  logic          gen_wbank;
  logic [KW-1:0] gen_wk;
  logic [PW-1:0] gen_pi [P];
  logic [PW-1:0] rev_buf [P][2][SW];

  assign gen_start  = (st == S_INIT) && (init_cnt == '0);
  assign gen_mark   = (st == S_INIT) && (init_cnt == XW'((P - 1) * W));
  assign gen_rewind = (st == S_WAIT) && ext_empty && !half[0] && (half != ($bits(half))'(2 * ITER - 1));
  assign gen_wr     = (st == S_PRE) || (feed && dsel && (fslot < SLW'(NWIN - 1)));
  assign gen_wbank  = (st == S_PRE) ? 1'b0 : ~fslot[0];
  assign gen_wk     = fk;

  for (genvar t = 0; t < P; t++) begin : g_gen
    ccsds_intlv_addr #(.AW(PW)) u_gen (
      .clk, .rst_n, .sel(K2SEL), .k2_ext(12'(K2)), .start(gen_start),
      .step((st == S_INIT) ? ((init_cnt > 0) && (init_cnt <= XW'(t * W))) : gen_wr),
      .mark(gen_mark), .rewind(gen_rewind), .pi(gen_pi[t]));
    always_ff @(posedge clk) if (gen_wr) rev_buf[t][gen_wbank][gen_wk] <= gen_pi[t];
  end

  // ------------------------------------------------------------------
  // read pipeline: F0 (address / table lookup), F1 (bank access), F2 (SISO)
  // ------------------------------------------------------------------
  logic [JW-1:0] f0_j;
  logic          f0_first;
  assign f0_j     = JW'(int'(fslot) * SW + (SW - 1 - int'(fk)));
  assign f0_first = feed && (fslot == '0) && (fk == '0);

  logic          f1_act, f1_first, f2_act;
  logic          f1_valid [P], f2_valid [P];
  logic [AW-1:0] f1_j [P], f1_addr [P];
  logic [TAGW-1:0] f2_tag [P];
  logic          f2_first_li;   // first half: intrinsic forced to zero

  logic          o1_act, o2_act;
  logic [BW-1:0] o1_t, o2_bank;
  logic [AW-1:0] o1_j;
  logic [PW-1:0] o1_pos, o2_pos;

  always_comb begin
    lut_rd_int = dsel && (st != S_OUT);
    for (int t = 0; t < P; t++) lut_rd_j[t] = AW'(f0_j);
    if (st == S_OUT) lut_rd_j[div_w(int'(ocnt))] = mod_w(int'(ocnt));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f1_act <= 1'b0; f1_first <= 1'b0; f2_act <= 1'b0; f2_first_li <= 1'b0;
      o1_act <= 1'b0; o2_act <= 1'b0; o1_t <= '0; o1_j <= '0; o1_pos <= '0; o2_bank <= '0; o2_pos <= '0;
      for (int t = 0; t < P; t++) begin
        f1_valid[t] <= 1'b0; f2_valid[t] <= 1'b0; f1_j[t] <= '0; f1_addr[t] <= '0; f2_tag[t] <= '0;
      end
    end else begin
      f1_act   <= feed;
      f1_first <= f0_first;
      f2_act   <= f1_act;
      f2_first_li <= (half == '0);
      for (int t = 0; t < P; t++) begin
        f1_valid[t] <= feed && (int'(f0_j) < W) && (t * W + int'(f0_j) < FRAME);
        f1_j[t]     <= AW'(f0_j);
        f1_addr[t]  <= dsel ? mod_w(int'(rev_buf[t][fslot[0]][KW'(SW - 1) - fk])) : AW'(f0_j);
        f2_valid[t] <= f1_valid[t];
        f2_tag[t]   <= {lut_rd_bank[t], f1_addr[t]};
      end
      o1_act <= (st == S_OUT);
      o1_t   <= div_w(int'(ocnt));
      o1_j   <= mod_w(int'(ocnt));
      o1_pos <= ocnt;
      o2_act <= o1_act;
      o2_bank <= lut_rd_bank[o1_t];
      o2_pos <= o1_pos;
    end
  end

  // crossbar for reads: extrinsic code and systematic value
  localparam int RW = DW + W_Y;
  logic          rx_valid [P];
  logic [DW-1:0] rx_wdata [P];
  logic          rb_en [P];
  logic [AW-1:0] rb_addr [P];
  logic [DW-1:0] rb_wdata [P];
  logic [RW-1:0] rb_rdata [P], r_rdata [P];
  logic [DW-1:0] ext_rd [P];
  logic          rconf, wconf;

  always_comb
    for (int t = 0; t < P; t++) begin
      rx_valid[t] = f1_valid[t];
      rx_wdata[t] = '0;
      rb_rdata[t] = {ext_rd[t], ys_rd[t]};
    end

  bank_xbar #(.P(P), .AW(AW), .DW(DW), .RW(RW)) u_rxbar (
    .clk, .rst_n, .req_valid(rx_valid), .req_bank(lut_rd_bank), .req_addr(f1_addr), .req_wdata(rx_wdata),
    .bank_en(rb_en), .bank_addr(rb_addr), .bank_wdata(rb_wdata), .bank_rdata(rb_rdata),
    .rdata(r_rdata), .conflict(rconf));

  logic          mem_rd_en;
  logic [AW-1:0] mem_rd_addr [P];
  assign mem_rd_en = f1_act || o1_act;
  assign ib_rd_en  = f1_act;
  always_comb
    for (int b = 0; b < P; b++) begin
      mem_rd_addr[b] = o1_act ? o1_j : rb_addr[b];
      ys_rd_addr[b]  = rb_addr[b];
      par_rd_addr[b] = f1_j[b];
    end

  // ------------------------------------------------------------------
  // SISOs
  // ------------------------------------------------------------------
  logic [2:0] en_a, en_b, en_cur;
  always_comb begin
    unique case (rate_e'(rate))
      RATE_1_2, RATE_1_3: begin en_a = 3'b001; en_b = 3'b001; end
      RATE_1_4:           begin en_a = 3'b110; en_b = 3'b001; end
      default:            begin en_a = 3'b111; en_b = 3'b101; end
    endcase
    en_cur = dsel ? en_b : en_a;
  end

  sm_t alpha_bnd [2][P][NSTATE];
  sm_t beta_bnd  [2][P][NSTATE];
  sm_t a_init [P][NSTATE], b_init [P][NSTATE];
  sm_t a_end  [P][NSTATE], b_start [P][NSTATE];
  logic          s_oval [P], s_odec [P], s_done [P], s_busy [P];
  logic [TAGW-1:0] s_otag [P];
  ex_t           s_oext [P];
  llr_t          s_ollr [P];
  exq_t          w_code [P];
  ex_t           li_dm  [P];
  y_t            s_yp   [P][3];
  logic          first_iter;

  assign first_iter = (half < 2);

  always_comb
    for (int t = 0; t < P; t++) begin
      for (int s = 0; s < NSTATE; s++) begin
        a_init[t][s] = (t == 0) ? ((s == 0) ? sm_t'(0) : SM_MIN) :
                       first_iter ? sm_t'(0) : alpha_bnd[dsel][(t == 0) ? 0 : t - 1][s];
        b_init[t][s] = (t == P - 1 || first_iter) ? sm_t'(0) : beta_bnd[dsel][(t == P - 1) ? t : t + 1][s];
      end
      s_yp[t] = dsel ? pb_rd[t] : pa_rd[t];
    end

  for (genvar t = 0; t < P; t++) begin : g_siso
    ext_nl_codec u_codec (.ex_in(s_oext[t]), .code_out(w_code[t]),
                          .code_in(r_rdata[t][RW-1-1 -: W_Q]), .ex_out(li_dm[t]));
    log_map_siso #(.SW(SW), .NWIN(NWIN), .TAGW(TAGW), .LOGMAP(LOGMAP)) u_siso (
      .clk, .rst_n, .start(f1_first), .lc, .en(en_cur),
      .in_valid(f2_valid[t]), .in_ys(r_rdata[t][W_Y-1:0]), .in_yp(s_yp[t]),
      .in_li(f2_first_li ? ex_t'(0) : li_dm[t]), .in_tag(f2_tag[t]),
      .alpha_init(a_init[t]), .beta_init(b_init[t]),
      .out_valid(s_oval[t]), .out_tag(s_otag[t]), .out_ext(s_oext[t]), .out_llr(s_ollr[t]),
      .out_dec(s_odec[t]), .alpha_end(a_end[t]), .beta_start(b_start[t]),
      .busy(s_busy[t]), .done(s_done[t]));
  end
  assign siso_done = s_done[0];

  always_ff @(posedge clk)
    if (siso_done)
      for (int t = 0; t < P; t++) begin
        alpha_bnd[dsel][t] <= a_end[t];
        beta_bnd[dsel][t]  <= b_start[t];
      end

  // ------------------------------------------------------------------
  // write path: SISO outputs -> crossbar -> extrinsic banks
  // ------------------------------------------------------------------
  logic [BW-1:0] wx_bank [P];
  logic [AW-1:0] wx_addr [P];
  logic [DW-1:0] wx_data [P];
  logic          wb_en [P];
  logic [AW-1:0] wb_addr [P];
  logic [DW-1:0] wb_data [P];
  logic [DW-1:0] wb_rdummy [P], w_rdummy [P];

  always_comb
    for (int t = 0; t < P; t++) begin
      wx_bank[t]   = s_otag[t][TAGW-1 -: BW];
      wx_addr[t]   = s_otag[t][AW-1:0];
      wx_data[t]   = {s_odec[t], w_code[t]};
      wb_rdummy[t] = '0;
    end

  bank_xbar #(.P(P), .AW(AW), .DW(DW), .RW(DW)) u_wxbar (
    .clk, .rst_n, .req_valid(s_oval), .req_bank(wx_bank), .req_addr(wx_addr), .req_wdata(wx_data),
    .bank_en(wb_en), .bank_addr(wb_addr), .bank_wdata(wb_data), .bank_rdata(wb_rdummy),
    .rdata(w_rdummy), .conflict(wconf));

  ext_mem_sp #(.P(P), .W(W), .DW(DW), .TD(TD)) u_ext (
    .clk, .rst_n, .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(ext_rd),
    .wr_en(wb_en), .wr_addr(wb_addr), .wr_data(wb_data),
    .buf_empty(ext_empty), .ovf(ext_ovf), .buf_wr(ext_bufwr), .drain(ext_drain));

  // ------------------------------------------------------------------
  // output and status
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_pos <= '0; out_bit <= 1'b0; frame_done <= 1'b0;
      err_conflict <= 1'b0;
    end else begin
      out_valid  <= o2_act;
      out_pos    <= o2_pos;
      out_bit    <= ext_rd[o2_bank][DW-1];
      frame_done <= o2_act && (o2_pos == PW'(FRAME - 1));
      if ((rconf && f1_act) || wconf) err_conflict <= 1'b1;
    end
  end
  assign err_ovf = ext_ovf;

endmodule
