// llr_unit: a-posteriori LLR of one information bit and its extrinsic
// part, from the forward metrics alpha_k, the branch metrics gamma_k and
// the backward metrics beta_{k+1} (max-log MAP):
//   L = max_{s,u=0} (alpha(s) + gamma(0,p) + beta(next(s,0)))
//     - max_{s,u=1} (alpha(s) + gamma(1,p) + beta(next(s,1)))
//   Le = L - (Ls + La) = L - g01
// Both are saturated to LLR_W bits. Combinational.
module llr_unit
  import mimo_pkg::*;
(
  input  metric_t alpha [NSTATES],
  input  metric_t beta  [NSTATES],
  input  gamma_t  g,
  output llr_t    l_app,
  output llr_t    l_ext
);
  always_comb begin
    logic signed [31:0] m0, m1, v, d;
    m0 = -32'sd1000000;
    m1 = -32'sd1000000;
    for (int s = 0; s < NSTATES; s++)
      for (int u = 0; u < 2; u++) begin
        v = 32'(alpha[s]) + 32'(gamma_of(g, u[0], rsc_parity(3'(s), u[0])))
            + 32'(beta[rsc_next(3'(s), u[0])]);
        if (u == 0) begin if (v > m0) m0 = v; end
        else        begin if (v > m1) m1 = v; end
      end
    d     = m0 - m1;
    l_app = sat_llr(d);
    l_ext = sat_llr(d - 32'(g.g01));
  end
endmodule
