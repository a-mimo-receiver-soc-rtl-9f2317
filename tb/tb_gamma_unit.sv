// tb_gamma_unit: all four branch metrics for random LLRs against
// gamma(u,p) = [u==0](Ls+La) + [p==0]Lp.
module tb_gamma_unit;
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
  llr_t ls, la, lp;
  gamma_t g;
  int checks = 0, failures = 0;
  gamma_unit dut (.*);
  initial begin
    for (int t = 0; t < 500; t++) begin
      ls = 8'($urandom); la = 8'($urandom); lp = 8'($urandom); #1;
      for (int u = 0; u < 2; u++) for (int p = 0; p < 2; p++) begin
        checks++;
        if (int'(gamma_of(g, u[0], p[0])) != gam(u, p, int'(ls) + int'(la), int'(lp))) begin failures++; $display("FAIL %0d", t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
