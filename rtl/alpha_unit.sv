// alpha_unit: one step of the forward recursion of the max-log MAP
// algorithm over the 8-state trellis of the constituent code:
//   alpha'(s') = max over (s,u) with next(s,u) = s' of alpha(s) + gamma(u,p(s,u))
// The result is normalised by subtracting alpha'(0), which keeps the
// metrics bounded. Combinational.
module alpha_unit
  import mimo_pkg::*;
(
  input  metric_t a_in  [NSTATES],
  input  gamma_t  g,
  output metric_t a_out [NSTATES]
);
  metric_t raw [NSTATES];
  always_comb begin
    for (int t = 0; t < NSTATES; t++) raw[t] = -metric_t'(16'sd16384);
    for (int s = 0; s < NSTATES; s++)
      for (int u = 0; u < 2; u++) begin
        logic [2:0] ns;
        metric_t    v;
        ns = rsc_next(3'(s), u[0]);
        v  = a_in[s] + MET_W'(gamma_of(g, u[0], rsc_parity(3'(s), u[0])));
        if (v > raw[ns]) raw[ns] = v;
      end
    for (int t = 0; t < NSTATES; t++) a_out[t] = raw[t] - raw[0];
  end
endmodule
