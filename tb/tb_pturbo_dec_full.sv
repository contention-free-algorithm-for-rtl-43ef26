// End-to-end test of the decoder at its default size, with no parameter
// overrides: 16 parallel decoders, 1784-bit CCSDS frames (k2 = 223, so each
// sub-block holds 112 positions and the last window of each is half empty),
// 32-step windows and 8 iterations. The mapping tables are loaded with a
// contention-free map the testbench computes itself, two rate-1/3 frames
// are decoded back to back, and the checks of pturbo_tb_body.svh apply.
module tb_pturbo_dec_full;
  import turbo_pkg::*;
  localparam int TB_P = 16, TB_FRAME = 1784, TB_SW = 32, TB_ITER = 8;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  logic map_ld_en, map_ld_int, ld_en, ld_page, go, dec_page, ready, busy, out_valid, out_bit, frame_done;
  logic [3:0] map_ld_t, map_ld_bank;
  logic [6:0] map_ld_j;
  logic [13:0] ld_pos, out_pos;
  y_t ld_ys; y_t ld_pa [3]; y_t ld_pb [3];
  logic [1:0] rate; logic [3:0] lc;
  logic err_conflict, err_ovf;

  pturbo_dec_top dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  `include "pturbo_tb_body.svh"
endmodule
