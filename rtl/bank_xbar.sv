// bank_xbar: P x P crossbar between the parallel decoders and the memory
// banks, steered by the bank numbers read from the mapping tables.
//
// Request side ("arbitrator"): requester t asks for bank req_bank[t] at
// address req_addr[t] (with write data req_wdata[t]); each bank b takes the
// request whose bank number equals b. Because the mapping is contention free
// no two valid requests name the same bank; 'conflict' flags a violation and
// an assertion checks it in simulation outside reset (rst_n is used for
// nothing else).
// Return side ("decision"): one cycle later (banks have registered reads)
// requester t receives the data of the bank it addressed.
module bank_xbar #(
  parameter int P  = 16,
  parameter int AW = 7,
  parameter int DW = 5,   // write data width
  parameter int RW = 10,  // read data width
  localparam int BW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,     // only qualifies the conflict assertion
  input  logic          req_valid [P],
  input  logic [BW-1:0] req_bank  [P],
  input  logic [AW-1:0] req_addr  [P],
  input  logic [DW-1:0] req_wdata [P],
  output logic          bank_en    [P],
  output logic [AW-1:0] bank_addr  [P],
  output logic [DW-1:0] bank_wdata [P],
  input  logic [RW-1:0] bank_rdata [P],
  output logic [RW-1:0] rdata      [P],
  output logic          conflict
);

  logic [BW-1:0] sel_q [P];

  always_comb begin
    conflict = 1'b0;
    for (int b = 0; b < P; b++) begin
      bank_en[b]    = 1'b0;
      bank_addr[b]  = '0;
      bank_wdata[b] = '0;
      for (int t = 0; t < P; t++) begin
        if (req_valid[t] && req_bank[t] == BW'(b)) begin
          if (bank_en[b]) conflict = 1'b1;
          bank_en[b]    = 1'b1;
          bank_addr[b]  = req_addr[t];
          bank_wdata[b] = req_wdata[t];
        end
      end
    end
  end

  always_ff @(posedge clk) sel_q <= req_bank;

  always_comb
    for (int t = 0; t < P; t++) rdata[t] = bank_rdata[sel_q[t]];

  a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n) !conflict)
    else $error("bank_xbar: two requests to one bank");

endmodule
