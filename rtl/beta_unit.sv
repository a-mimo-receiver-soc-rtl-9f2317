// beta_unit: one step of the backward recursion of the max-log MAP
// algorithm, used both as the beta unit and as the pre-beta unit (which
// runs ahead over the next window from equal metrics to find the starting
// metrics of the beta recursion):
//   beta(s) = max over u of beta'(next(s,u)) + gamma(u,p(s,u))
// normalised by subtracting beta(0). Combinational.
module beta_unit
  import mimo_pkg::*;
(
  input  metric_t b_in  [NSTATES],
  input  gamma_t  g,
  output metric_t b_out [NSTATES]
);
  metric_t raw [NSTATES];
  always_comb begin
    for (int s = 0; s < NSTATES; s++) begin
      metric_t v0, v1;
      v0 = b_in[rsc_next(3'(s), 1'b0)] + MET_W'(gamma_of(g, 1'b0, rsc_parity(3'(s), 1'b0)));
      v1 = b_in[rsc_next(3'(s), 1'b1)] + MET_W'(gamma_of(g, 1'b1, rsc_parity(3'(s), 1'b1)));
      raw[s] = (v0 > v1) ? v0 : v1;
    end
    for (int s = 0; s < NSTATES; s++) b_out[s] = raw[s] - raw[0];
  end
endmodule
