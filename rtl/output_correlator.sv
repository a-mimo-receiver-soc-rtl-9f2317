// output_correlator: correlates the summed output of the four FIR filters
// of an equalizer with the C-SS pilot over one correlation period:
//   z = sum over the period of y(n) * c(n),  c(n) = +-1 +-j.
// Its result, compared with the expected pilot amplitude, gives the error
// that steers the coefficient update.
//
// Interface and timing: as the input correlator. `en` accumulates y and c
// at the clock edge; with `last` the total including the current chip
// appears on `z` together with a one-cycle `z_valid` pulse.
module output_correlator
  import mimo_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  last,
  input  acc_t  y,
  input  chip_t css,
  output acc_t  z,
  output logic  z_valid
);
  acc_t acc, nxt;

  always_comb begin
    nxt.re = acc.re + (css.re[CHIP_W-1] ? -y.re : y.re) - (css.im[CHIP_W-1] ? -y.im : y.im);
    nxt.im = acc.im + (css.im[CHIP_W-1] ? -y.re : y.re) + (css.re[CHIP_W-1] ? -y.im : y.im);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      z       <= '0;
      z_valid <= 1'b0;
    end else begin
      z_valid <= en && last;
      if (en) begin
        if (last) begin
          z   <= nxt;
          acc <= '0;
        end else begin
          acc <= nxt;
        end
      end
    end
  end
endmodule
