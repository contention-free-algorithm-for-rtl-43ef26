// smc: one step of the 16-state forward (alpha) or backward (beta) state
// metric recursion.
//
// Forward:  alpha'(n) = max*( alpha(s) + gamma(s,u) ) over the two branches
//           (s,u) that enter state n.
// Backward: beta(s)   = max*( beta(next(s,u)) + gamma(s,u) ) over u = 0, 1.
// max* is the maximum plus the table correction ln(1+exp(-|d|)) (log-MAP);
// with LOGMAP=0 the correction is dropped (max-log-MAP). After the
// add-compare-select the metrics are rescaled by subtracting their maximum,
// so that all results are <= 0, and are saturated at the most negative 9-bit
// value. This is the add-compare-select-offset unit of the decoder described
// as one combinational step; the retimed (OACS) variant computes the same
// values with a shorter critical path and is not reproduced here.
module smc
  import turbo_pkg::*;
#(
  parameter bit LOGMAP = 1'b1
) (
  input  logic dir,              // 0 = forward, 1 = backward
  input  sm_t  sm_in  [NSTATE],
  input  bm_t  gamma  [NSTATE],  // indexed by branch combination
  output sm_t  sm_out [NSTATE]
);

  int raw [NSTATE];
  int mx;
  logic [3:0] s0, s1;
  logic       u0, u1;
  int fwd, bwd;

  always_comb begin
    s0 = '0; s1 = '0; u0 = 1'b0; u1 = 1'b0; fwd = 0; bwd = 0;
    for (int n = 0; n < NSTATE; n++) begin
      // forward: predecessors of n = {a,d1,d2,d3} are s = {d1,d2,d3,d4}
      s0  = {4'(n)} << 1;
      s1  = s0 | 4'd1;
      u0  = n[3] ^ s0[1] ^ s0[0];
      u1  = n[3] ^ s1[1] ^ s1[0];
      fwd = max_star(int'(sm_in[s0]) + int'(gamma[branch_combo(s0, u0)]),
                     int'(sm_in[s1]) + int'(gamma[branch_combo(s1, u1)]), LOGMAP);
      // backward: successors of s = n
      bwd = max_star(int'(sm_in[rsc_next(4'(n), 1'b0)]) + int'(gamma[branch_combo(4'(n), 1'b0)]),
                     int'(sm_in[rsc_next(4'(n), 1'b1)]) + int'(gamma[branch_combo(4'(n), 1'b1)]), LOGMAP);
      raw[n] = dir ? bwd : fwd;
    end
    mx = raw[0];
    for (int n = 1; n < NSTATE; n++) if (raw[n] > mx) mx = raw[n];
    for (int n = 0; n < NSTATE; n++) begin
      int v;
      v = raw[n] - mx;
      sm_out[n] = (v < int'(SM_MIN)) ? SM_MIN : sm_t'(v);
    end
  end

endmodule
