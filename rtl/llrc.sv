// llrc: log-likelihood ratio calculation for one trellis step.
//
// L(u) = max*_{u=1}( alpha(s) + gamma(s,1) + beta(next(s,1)) )
//      - max*_{u=0}( alpha(s) + gamma(s,0) + beta(next(s,0)) ),
// with each 16-input max* evaluated as a balanced tree of 2-input max*
// units. Following the decoder's LLR diagram the unit is pipelined: the
// branch sums are registered, then the two max* tree results, then the
// difference (LAT = 3 cycles from 'in_valid' to 'out_valid'). The number of
// tree levels per register stage is this design's choice.
module llrc
  import turbo_pkg::*;
#(
  parameter bit LOGMAP = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  sm_t  alpha [NSTATE],   // metrics before the step
  input  sm_t  beta  [NSTATE],   // metrics after the step
  input  bm_t  gamma [NSTATE],   // indexed by branch combination
  output logic out_valid,
  output llr_t llr
);

  localparam int LAT = 3;

  typedef logic signed [W_LLR-1:0] acc_t;
  acc_t sum1 [NSTATE], sum0 [NSTATE];
  acc_t sum1_q [NSTATE], sum0_q [NSTATE];
  acc_t m1_q, m0_q;
  logic [LAT-1:0] vpipe;

  always_comb begin
    for (int s = 0; s < NSTATE; s++) begin
      sum1[s] = acc_t'(int'(alpha[s]) + int'(gamma[branch_combo(4'(s), 1'b1)]) + int'(beta[rsc_next(4'(s), 1'b1)]));
      sum0[s] = acc_t'(int'(alpha[s]) + int'(gamma[branch_combo(4'(s), 1'b0)]) + int'(beta[rsc_next(4'(s), 1'b0)]));
    end
  end

  function automatic int tree16(input acc_t v [NSTATE]);
    int l [NSTATE];
    for (int k = 0; k < NSTATE; k++) l[k] = int'(v[k]);
    for (int w = NSTATE / 2; w >= 1; w = w / 2)
      for (int k = 0; k < w; k++) l[k] = max_star(l[2*k], l[2*k+1], LOGMAP);
    return l[0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0;
      m1_q  <= '0;
      m0_q  <= '0;
      llr   <= '0;
      for (int s = 0; s < NSTATE; s++) begin
        sum1_q[s] <= '0;
        sum0_q[s] <= '0;
      end
    end else begin
      vpipe <= {vpipe[LAT-2:0], in_valid};
      sum1_q <= sum1;
      sum0_q <= sum0;
      m1_q <= acc_t'(tree16(sum1_q));
      m0_q <= acc_t'(tree16(sum0_q));
      llr  <= llr_t'(int'(m1_q) - int'(m0_q));
    end
  end

  assign out_valid = vpipe[LAT-1];

endmodule
