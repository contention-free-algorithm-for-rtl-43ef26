// End-to-end test of the 8-decoder configuration on 1784-bit CCSDS frames
// (32-step windows, 8 iterations). Each sub-block has 223 positions in seven
// windows, so reads and writes of the extrinsic banks overlap for a long
// stretch and the temporary buffer carries many rows. The checks are those
// of pturbo_tb_body.svh (contention-free map, decoding quality, mechanism
// counters).
module tb_pturbo_dec_p8;
  import turbo_pkg::*;
  localparam int TB_P = 8, TB_FRAME = 1784, TB_SW = 32, TB_ITER = 8;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  logic map_ld_en, map_ld_int, ld_en, ld_page, go, dec_page, ready, busy, out_valid, out_bit, frame_done;
  logic [2:0] map_ld_t, map_ld_bank;
  logic [7:0] map_ld_j;
  logic [13:0] ld_pos, out_pos;
  y_t ld_ys; y_t ld_pa [3]; y_t ld_pb [3];
  logic [1:0] rate; logic [3:0] lc;
  logic err_conflict, err_ovf;

  pturbo_dec_top #(.P(TB_P)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  `include "pturbo_tb_body.svh"
endmodule
