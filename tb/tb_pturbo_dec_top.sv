// End-to-end test of the parallel decoder at reduced size: 4 decoders,
// 120-bit frames (k2 = 15, so the last sub-block and every last window are
// partly empty), 8-step windows, 4 iterations. See pturbo_tb_body.svh.
module tb_pturbo_dec_top;
  import turbo_pkg::*;
  localparam int TB_P = 4, TB_FRAME = 120, TB_SW = 8, TB_ITER = 4;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  logic map_ld_en, map_ld_int, ld_en, ld_page, go, dec_page, ready, busy, out_valid, out_bit, frame_done;
  logic [1:0] map_ld_t, map_ld_bank;
  logic [4:0] map_ld_j;
  logic [13:0] ld_pos, out_pos;
  y_t ld_ys; y_t ld_pa [3]; y_t ld_pb [3];
  logic [1:0] rate; logic [3:0] lc;
  logic err_conflict, err_ovf;

  pturbo_dec_top #(.P(TB_P), .FRAME(TB_FRAME), .SW(TB_SW), .ITER(TB_ITER)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  `include "pturbo_tb_body.svh"
endmodule
