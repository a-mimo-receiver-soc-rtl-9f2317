// tb_alpha_unit: random state metrics and LLRs; each output state metric
// must be the maximum over incoming branches minus that of state 0, using
// the shift-register reference of the code.
module tb_alpha_unit;
  import mimo_pkg::*;
  // reference trellis from the shift-register description: register a1 a2 a3
  // (a1 newest), feedback a = u ^ a2 ^ a3, parity a ^ a1 ^ a3, state
  // index a1 + 2*a2 + 4*a3; branch metric [u==0]A + [p==0]Lp

  function automatic int nxt(int s, int u);
    int a1, a2, a3, a;
    a1 = s & 1; a2 = (s >> 1) & 1; a3 = (s >> 2) & 1;
    a = u ^ a2 ^ a3;
    return a + 2 * a1 + 4 * a2;
  endfunction
  function automatic int par(int s, int u);
    int a1, a2, a3, a;
    a1 = s & 1; a2 = (s >> 1) & 1; a3 = (s >> 2) & 1;
    a = u ^ a2 ^ a3;
    return a ^ a1 ^ a3;
  endfunction
  // gamma for L = ln P(0)/P(1): (u==0)*A + (p==0)*Lp
  function automatic int gam(int u, int p, int A, int Lp);
    return (u == 0 ? A : 0) + (p == 0 ? Lp : 0);
  endfunction
  metric_t a_in [NSTATES], a_out [NSTATES];
  gamma_t g;
  int checks = 0, failures = 0;
  alpha_unit dut (.*);
  initial begin
    for (int t = 0; t < 300; t++) begin
      int A, Lp, r [8];
      foreach (a_in[s]) a_in[s] = 16'($signed($urandom_range(2000)) - 1000);
      A = $signed($urandom_range(400)) - 200; Lp = $signed($urandom_range(250)) - 125;
      g.g00 = 10'(A + Lp); g.g01 = 10'(A); g.g10 = 10'(Lp);
      #1;
      foreach (r[s]) r[s] = -100000;
      for (int s = 0; s < 8; s++) for (int u = 0; u < 2; u++) begin
        int v;
        v = a_in[s] + gam(u, par(s, u), A, Lp);
        if (v > r[nxt(s, u)]) r[nxt(s, u)] = v;
      end
      for (int s = 0; s < 8; s++) begin
        checks++; if (a_out[s] != 16'(r[s] - r[0])) begin failures++; $display("FAIL t %0d s %0d", t, s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
