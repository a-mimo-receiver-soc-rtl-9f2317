// fir_filter: complex finite impulse response filter for one receive
// antenna inside an equalizer, NTAPS (16) taps long so that it spans the
// inter-symbol interference of 16 consecutive chips.
//
// How it works: a shift register holds the last NTAPS chips, tap k holding
// r(n-k). The output is sum_k w[k] * r(n-k), formed combinationally from the
// register contents and the coefficient inputs at full precision (ACC_W
// bits, COEF_FRAC fractional bits from the coefficients). The enclosing
// equalizer adds the four filter outputs and rescales. The tap contents are
// brought out because the input correlator correlates the same delayed
// chips with the pilot.
//
// Timing: `adv` shifts chip `din` in at the clock edge; `dout` is valid for
// the new contents in the following cycle. The tap count follows the
// description; the word widths are this implementation's choices.
module fir_filter
  import mimo_pkg::*;
#(
  parameter int unsigned TAPS = NTAPS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  adv,
  input  chip_t din,
  input  coef_t coef [TAPS],
  output chip_t taps [TAPS],
  output acc_t  dout
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) taps[k] <= '0;
    end else if (adv) begin
      taps[0] <= din;
      for (int k = 1; k < TAPS; k++) taps[k] <= taps[k-1];
    end
  end

  always_comb begin
    acc_t p;
    dout = '0;
    for (int k = 0; k < TAPS; k++) begin
      p = cmul(32'(coef[k].re), 32'(coef[k].im), 32'(taps[k].re), 32'(taps[k].im));
      dout.re = dout.re + p.re;
      dout.im = dout.im + p.im;
    end
  end
endmodule
