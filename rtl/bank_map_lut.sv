// bank_map_lut: look-up tables of the contention-free memory mapping.
//
// The mapping C assigns every frame position x to one of P memory banks so
// that the P positions handled in the same cycle are in different banks, both
// in natural order (positions t*W+j, t = 0..P-1) and in interleaved order
// (positions pi(t*W+j)). It is found off line and loaded here. Two tables
// are kept, each split into P sub-tables of depth W indexed by the local time
// j of decoder t:
//   natural table:     NAT[t][j] = C(t*W+j)       (used by the first decoder)
//   interleaved table: INT[t][j] = C(pi(t*W+j))   (used by the second decoder)
// so that every decoder reads its own sub-table each cycle without conflict.
// A further read port 'q' on the natural table serves the loader that puts
// received values into the banked input buffer.
//
// Timing: all reads are registered (one cycle). Loading is a simple write
// port; the tables are plain arrays (ROM contents in a fixed product).
module bank_map_lut #(
  parameter int P  = 16,
  parameter int W  = 112,
  localparam int BW = (P > 1) ? $clog2(P) : 1,
  localparam int JW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  // load port
  input  logic          ld_en,
  input  logic          ld_int,
  input  logic [BW-1:0] ld_t,
  input  logic [JW-1:0] ld_j,
  input  logic [BW-1:0] ld_bank,
  // one read port per decoder
  input  logic          rd_int,
  input  logic [JW-1:0] rd_j    [P],
  output logic [BW-1:0] rd_bank [P],
  // loader port on the natural table
  input  logic [BW-1:0] q_t,
  input  logic [JW-1:0] q_j,
  output logic [BW-1:0] q_bank
);

  logic [BW-1:0] nat_tab [P][W];
  logic [BW-1:0] int_tab [P][W];

  always_ff @(posedge clk) begin
    if (ld_en && !ld_int) nat_tab[ld_t][ld_j] <= ld_bank;
    if (ld_en &&  ld_int) int_tab[ld_t][ld_j] <= ld_bank;
    for (int t = 0; t < P; t++)
      rd_bank[t] <= rd_int ? int_tab[t][rd_j[t]] : nat_tab[t][rd_j[t]];
    q_bank <= nat_tab[q_t][q_j];
  end

endmodule
