// bmc: branch metric calculation for one trellis step of the 16-state code.
//
// gamma = 1/2 * ( xs*(Li + Lc*ys) + sum_i en_i * xi * Lc*yp_i ),
// evaluated for all 16 sign combinations {xs,x1,x2,x3} (bit 1 = +1). As in
// the decoder's BMC diagram, each channel value is gated by a code-rate
// enable and multiplied by Lc, the systematic term is added to the intrinsic
// value Li, the parity terms are summed pairwise, the total is halved and
// saturated, and the complementary combination is taken as the negative.
// The channel products are saturated to the 6-bit branch-metric format
// before the additions (this design's choice). 'apri' = Li + Lc*ys is passed
// out because the extrinsic value is the LLR minus this term.
//
// Purely combinational: the pipeline registers of the published diagram are
// left to the caller, which uses the metrics in the same cycle as its memory
// read.
module bmc
  import turbo_pkg::*;
(
  input  y_t              ys,
  input  y_t              yp [3],
  input  ex_t             li,
  input  logic [W_LC-1:0] lc,   // Lc with two fractional bits
  input  logic [2:0]      en,   // parity enables {yp[0],yp[1],yp[2]} -> en[0..2]
  output bm_t             gamma [NSTATE],
  output logic signed [7:0] apri
);

  int cs, cp [3], a;

  always_comb begin
    cs = sat_sym((int'(ys) * int'({1'b0, lc})) >>> 2, W_BM);
    for (int i = 0; i < 3; i++)
      cp[i] = en[i] ? sat_sym((int'(yp[i]) * int'({1'b0, lc})) >>> 2, W_BM) : 0;
    a    = int'(li) + cs;
    apri = 8'(a);
    for (int c = 0; c < NSTATE; c++) begin
      int v;
      v = (c[3] ? a : -a) + (c[2] ? cp[0] : -cp[0])
        + (c[1] ? cp[1] : -cp[1]) + (c[0] ? cp[2] : -cp[2]);
      gamma[c] = bm_t'(sat_sym(v >>> 1, W_BM));
    end
  end

endmodule
