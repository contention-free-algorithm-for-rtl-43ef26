// ext_mem_sp: area-efficient extrinsic storage built from P single-port
// banks plus one temporary buffer.
//
// In a half iteration the decoders first read all banks (intrinsic values)
// and, after their latency, write new extrinsic values to all banks. With P
// parallel decoders the two phases overlap only for a short time; a
// single-port bank cannot serve both, so every write that arrives while the
// read phase is still running ('rd_en' high) is parked in the temporary
// buffer as one row holding the words for all P banks together with their
// addresses. When the banks are idle (no read, no write) the buffer is
// drained one row per cycle into all banks at once. Writes outside the read
// phase go straight to the banks. Each bank therefore makes at most one
// access per cycle, as a single-port RAM allows.
//
// The row layout (one word and one address per bank) and the drain policy
// are this design's choices; the buffer depth TD should cover the overlap of
// the read and write phases ('ovf' reports a full buffer). Reads are
// registered: rd_data is valid the cycle after rd_en.
module ext_mem_sp #(
  parameter int P  = 16,
  parameter int W  = 112,
  parameter int DW = 5,
  parameter int TD = 64,
  localparam int AW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr [P],
  output logic [DW-1:0] rd_data [P],
  input  logic          wr_en   [P],
  input  logic [AW-1:0] wr_addr [P],
  input  logic [DW-1:0] wr_data [P],
  output logic          buf_empty,
  output logic          ovf,
  output logic          buf_wr,    // a row was parked this cycle
  output logic          drain      // a row was drained this cycle
);

  localparam int CW = $clog2(TD + 1);
  localparam int IW = (TD > 1) ? $clog2(TD) : 1;   // row index width

  typedef struct packed {
    logic          v;
    logic [AW-1:0] a;
    logic [DW-1:0] d;
  } ent_t;

  logic [DW-1:0] bank [P][W];
  ent_t          tbuf [TD][P];
  logic [CW-1:0] cnt;
  logic          any_wr;

  always_comb begin
    any_wr = 1'b0;
    for (int b = 0; b < P; b++) any_wr |= wr_en[b];
  end

  assign buf_wr    = rd_en && any_wr;
  assign drain     = !rd_en && !any_wr && (cnt != '0);
  assign buf_empty = (cnt == '0);

  ent_t top_row [P];
  always_comb
    for (int b = 0; b < P; b++) top_row[b] = tbuf[(cnt == '0) ? 0 : int'(cnt) - 1][b];

  always_ff @(posedge clk) begin
    for (int b = 0; b < P; b++) begin
      if (rd_en)
        rd_data[b] <= bank[b][rd_addr[b]];
      else if (wr_en[b])
        bank[b][wr_addr[b]] <= wr_data[b];
      else if (drain && top_row[b].v)
        bank[b][top_row[b].a] <= top_row[b].d;
    end
    if (buf_wr && cnt < CW'(TD))
      for (int b = 0; b < P; b++) tbuf[IW'(cnt)][b] <= '{v: wr_en[b], a: wr_addr[b], d: wr_data[b]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; ovf <= 1'b0;
    end else if (buf_wr) begin
      if (cnt < CW'(TD)) cnt <= cnt + 1'b1;
      else ovf <= 1'b1;
    end else if (drain) cnt <= cnt - 1'b1;
  end

endmodule
