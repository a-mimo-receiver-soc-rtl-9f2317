// matrix_computation: evaluates the sphere-decoder cost
//   J(s) = || H s - y ||^2
// for two candidate symbol vectors at once, in two identical datapaths.
// Candidates arrive as integer levels per dimension (lvl_t); H and y carry
// SYM_FRAC fractional bits, so H s - y does too and its squared norm is
// shifted right by SYM_FRAC to return J in the same scale.
//
// Interface and timing: purely combinational; the sphere decoder registers
// the results in the book-keeping module. Two datapaths follow the
// description; the arithmetic form (costs from H rather than from a
// triangular factor) is this implementation's choice.
module matrix_computation
  import mimo_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  input  sym_t        h [NTX][NTX],
  input  sym_t        y [NTX],
  input  lvl_t        cand [LANES][NTX],
  output logic [31:0] cost [LANES]
);
  always_comb
    for (int l = 0; l < LANES; l++) begin
      logic [47:0] acc;
      acc = '0;
      for (int m = 0; m < NTX; m++) begin
        logic signed [47:0] er, ei;
        er = -48'(y[m].re);
        ei = -48'(y[m].im);
        for (int k = 0; k < NTX; k++) begin
          er += 48'(h[m][k].re) * 48'(cand[l][k].re) - 48'(h[m][k].im) * 48'(cand[l][k].im);
          ei += 48'(h[m][k].re) * 48'(cand[l][k].im) + 48'(h[m][k].im) * 48'(cand[l][k].re);
        end
        acc += 48'(er * er + ei * ei);
      end
      acc     = acc >> SYM_FRAC;
      cost[l] = (acc > 48'hFFFF_FFFF) ? 32'hFFFF_FFFF : acc[31:0];
    end
endmodule
