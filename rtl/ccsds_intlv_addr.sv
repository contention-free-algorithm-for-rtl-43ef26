// ccsds_intlv_addr: on-line CCSDS turbo interleaver address generator.
//
// Produces pi(s) for s = 1, 2, 3, ... one value per 'step', following the
// CCSDS permutation with k = 8*k2:
//   m = (s-1) mod 2, i = floor((s-1)/(2*k2)), j = floor((s-1)/2) - i*k2,
//   t = (19i+1) mod 4, q = t+1, c = (p_q*j + 21m) mod k2,
//   pi(s) = 2(q + 4c) - m.
// As in the published address circuit, q for i = 0..3 is the constant
// sequence 2, 1, 4, 3, and c is kept in a register that is advanced by 21
// (when m goes 0->1) or by p_q-21 (10, 16, 22 or 26 when m goes 1->0),
// followed by one conditional subtraction of k2. k2 is selected from the
// printed list 223, 446, 892, 1115, 2048 by 'sel'; this design adds sel=5..7
// to take k2 from 'k2_ext' so that short test frames can be used.
//
// Interface: 'start' resets the generator to s=1; 'step' advances s by one.
// 'pi' is the 0-based address pi(s)-1 of the current s (combinational from
// the registers). 'mark' saves the current position and 'rewind' returns to
// the saved one; these two are this design's additions so that each of the
// parallel decoders can restart its own sub-block every half iteration.
module ccsds_intlv_addr #(
  parameter int AW = 14  // width of the address output
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [2:0]    sel,
  input  logic [11:0]   k2_ext,
  input  logic          start,
  input  logic          step,
  input  logic          mark,
  input  logic          rewind,
  output logic [AW-1:0] pi
);

  typedef struct packed {
    logic        m;
    logic [1:0]  i;
    logic [11:0] j;
    logic [11:0] c;
  } gstate_t;

  gstate_t st, saved, nxt;
  logic [11:0] k2;
  logic [2:0]  q;
  logic [6:0]  inc_raw;
  logic [11:0] inc, csum;

  always_comb begin
    unique case (sel)
      3'd0:    k2 = 12'd223;
      3'd1:    k2 = 12'd446;
      3'd2:    k2 = 12'd892;
      3'd3:    k2 = 12'd1115;
      3'd4:    k2 = 12'd2048;
      default: k2 = k2_ext;
    endcase
    unique case (st.i)
      2'd0: q = 3'd2;
      2'd1: q = 3'd1;
      2'd2: q = 3'd4;
      default: q = 3'd3;
    endcase
  end

  // Increment of c for the next s: 21 into an odd position, p_q-21 into the
  // next even one. Both are reduced mod k2 for very short frames.
  always_comb begin
    if (!st.m) inc_raw = 7'd21;
    else begin
      unique case (q)
        3'd1: inc_raw = 7'd10;   // 31-21
        3'd2: inc_raw = 7'd16;   // 37-21
        3'd3: inc_raw = 7'd22;   // 43-21
        default: inc_raw = 7'd26; // 47-21
      endcase
    end
    inc  = (k2 > 12'(inc_raw)) ? 12'(inc_raw) : 12'(12'(inc_raw) % k2);
    csum = st.c + inc;
    if (csum >= k2) csum = csum - k2;

    nxt = st;
    if (!st.m) begin
      nxt.m = 1'b1;
      nxt.c = csum;
    end else begin
      nxt.m = 1'b0;
      if (st.j == k2 - 12'd1) begin
        nxt.j = '0;
        nxt.i = st.i + 2'd1;
        nxt.c = '0;
      end else begin
        nxt.j = st.j + 12'd1;
        nxt.c = csum;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= '0;
      saved <= '0;
    end else begin
      if (start)       st <= '0;
      else if (rewind) st <= saved;
      else if (step)   st <= nxt;
      if (mark) saved <= st;
    end
  end

  // pi(s)-1 = 2q + 8c - m - 1
  assign pi = AW'(2 * int'(q) + 8 * int'(st.c) - int'(st.m) - 1);

endmodule
