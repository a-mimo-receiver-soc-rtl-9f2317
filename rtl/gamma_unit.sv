// gamma_unit: branch transition metrics of one trellis column. With the
// a-priori LLR La (extrinsic from the other half-iteration), the
// systematic LLR Ls and the parity LLR Lp (all ln P(0)/P(1)):
//   A = Ls + La,  gamma(u,p) = [u==0]*A + [p==0]*Lp
// so g00 = A + Lp, g01 = A, g10 = Lp and g11 = 0. Combinational.
module gamma_unit
  import mimo_pkg::*;
(
  input  llr_t   ls,
  input  llr_t   la,
  input  llr_t   lp,
  output gamma_t g
);
  logic signed [GAM_W-1:0] a;
  assign a     = GAM_W'(ls) + GAM_W'(la);
  assign g.g00 = a + GAM_W'(lp);
  assign g.g01 = a;
  assign g.g10 = GAM_W'(lp);
endmodule
