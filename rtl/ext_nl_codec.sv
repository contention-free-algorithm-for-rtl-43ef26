// ext_nl_codec: non-linear mapping of extrinsic values into 4-bit codes for
// storage, and the matching de-mapping back to 6-bit intrinsic values.
//
// The mapping keeps the sign and rounds the magnitude down to a power of two,
// saturating at 16 (in LSB units of the (6,2) format): magnitudes 0, 1, 2..3,
// 4..7, 8..15 and 16..32 become the levels 0, 1, 2, 4, 8 and 16. The levels
// 2, 4, 8 and 16 and the rounding toward zero follow the decoder's mapping
// curve; the level 1 for a magnitude of 1 and the code layout {sign, 3-bit
// level index} are this design's choices. Both directions are purely
// combinational.
module ext_nl_codec
  import turbo_pkg::*;
(
  input  ex_t  ex_in,    // extrinsic value to be stored
  output exq_t code_out, // 4-bit code
  input  exq_t code_in,  // stored code
  output ex_t  ex_out    // de-mapped intrinsic value
);

  logic [5:0] mag;
  logic [2:0] lvl;

  always_comb begin
    mag = ex_in[W_EX-1] ? 6'(-int'(ex_in)) : 6'(ex_in);
    if      (mag >= 6'd16) lvl = 3'd5;
    else if (mag >= 6'd8)  lvl = 3'd4;
    else if (mag >= 6'd4)  lvl = 3'd3;
    else if (mag >= 6'd2)  lvl = 3'd2;
    else if (mag == 6'd1)  lvl = 3'd1;
    else                   lvl = 3'd0;
    code_out = {ex_in[W_EX-1] && (lvl != 3'd0), lvl};
  end

  logic [4:0] dmag;
  always_comb begin
    dmag = (code_in[2:0] == 3'd0) ? 5'd0 :
           (code_in[2:0] > 3'd5)  ? 5'd16 : 5'(1 << (code_in[2:0] - 3'd1));
    ex_out = code_in[3] ? ex_t'(-int'(dmag)) : ex_t'(dmag);
  end

endmodule
