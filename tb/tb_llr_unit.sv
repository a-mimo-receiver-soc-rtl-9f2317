// tb_llr_unit: random alpha, beta and branch metrics; the a-posteriori LLR
// must be max over u=0 branches minus max over u=1 branches of
// alpha + gamma + beta, and the extrinsic LLR that minus (Ls + La), both
// saturated to +-127.
module tb_llr_unit;
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
  metric_t alpha [NSTATES], beta [NSTATES];
  gamma_t g;
  llr_t l_app, l_ext;
  int checks = 0, failures = 0;
  llr_unit dut (.*);
  function automatic int sat(int v); return v > 127 ? 127 : (v < -127 ? -127 : v); endfunction
  initial begin
    for (int t = 0; t < 400; t++) begin
      int A, Lp, m0, m1, sc;
      sc = (t % 2) ? 40 : 400;
      foreach (alpha[s]) begin alpha[s] = 16'($signed($urandom_range(2*sc)) - sc); beta[s] = 16'($signed($urandom_range(2*sc)) - sc); end
      A = $signed($urandom_range(200)) - 100; Lp = $signed($urandom_range(200)) - 100;
      g.g00 = 10'(A + Lp); g.g01 = 10'(A); g.g10 = 10'(Lp);
      #1;
      m0 = -1000000; m1 = -1000000;
      for (int s = 0; s < 8; s++) for (int u = 0; u < 2; u++) begin
        int v;
        v = alpha[s] + gam(u, par(s, u), A, Lp) + beta[nxt(s, u)];
        if (u == 0 && v > m0) m0 = v;
        if (u == 1 && v > m1) m1 = v;
      end
      checks++;
      if (l_app != 8'(sat(m0 - m1)) || l_ext != 8'(sat(m0 - m1 - A))) begin failures++; $display("FAIL %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
