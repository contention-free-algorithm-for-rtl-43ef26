// in_buf: double (two-page) input buffer for the received codeword.
//
// One page can be filled with the next frame while the decoder works on the
// other. Each page holds
//   - the systematic values ys, banked by the contention-free mapping
//     (bank C(x), address x mod W), because the second decoder reads them in
//     interleaved order through the crossbar together with the extrinsic
//     values;
//   - the parity values, banked by sub-block (bank x div W, address x mod W):
//     three parity streams of the first encoder (pa) and three of the second
//     (pb). The second encoder's parity of transmission time k belongs to
//     interleaved index k, which is exactly the order in which the second
//     decoder reads it, so both parity sets share one word.
// Loading writes one position per cycle through two independent write ports
// (ys and parity), each with its own page select so the two ports may work
// on different pages in the same cycle. Reads are registered (one cycle).
module in_buf
  import turbo_pkg::*;
#(
  parameter int P  = 16,
  parameter int W  = 112,
  localparam int BW = (P > 1) ? $clog2(P) : 1,
  localparam int AW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  // load
  input  logic          ld_ys_en,
  input  logic          ld_ys_page,
  input  logic [BW-1:0] ld_ys_bank,
  input  logic [AW-1:0] ld_ys_addr,
  input  y_t            ld_ys,
  input  logic          ld_par_en,
  input  logic          ld_par_page,
  input  logic [BW-1:0] ld_par_bank,
  input  logic [AW-1:0] ld_par_addr,
  input  y_t            ld_pa [3],
  input  y_t            ld_pb [3],
  // decode
  input  logic          rd_page,
  input  logic          rd_en,
  input  logic [AW-1:0] ys_rd_addr  [P],
  output y_t            ys_rd       [P],
  input  logic [AW-1:0] par_rd_addr [P],
  output y_t            pa_rd [P][3],
  output y_t            pb_rd [P][3]
);

  typedef struct packed { y_t a0, a1, a2, b0, b1, b2; } par_t;

  y_t   ys_mem  [2][P][W];
  par_t par_mem [2][P][W];

  always_ff @(posedge clk) begin
    if (ld_ys_en)  ys_mem[ld_ys_page][ld_ys_bank][ld_ys_addr] <= ld_ys;
    if (ld_par_en) par_mem[ld_par_page][ld_par_bank][ld_par_addr] <=
                     '{a0: ld_pa[0], a1: ld_pa[1], a2: ld_pa[2], b0: ld_pb[0], b1: ld_pb[1], b2: ld_pb[2]};
    if (rd_en)
      for (int b = 0; b < P; b++) begin
        par_t w;
        w = par_mem[rd_page][b][par_rd_addr[b]];
        ys_rd[b] <= ys_mem[rd_page][b][ys_rd_addr[b]];
        pa_rd[b] <= '{w.a0, w.a1, w.a2};
        pb_rd[b] <= '{w.b0, w.b1, w.b2};
      end
  end

endmodule
