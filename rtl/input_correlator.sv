// input_correlator: correlates the received chip sequence of every receive
// antenna with the C-SS pilot (the conjugate of the spread and scrambled
// pilot). It holds one submodule's worth of accumulators per receive
// antenna, NRX in all, and each of them correlates every FIR delay tap:
//   R[m][k] = sum over one correlation period of r_m(n-k) * c(n).
// The C-SS pilot chip is +-1 +-j, so each product is an add or subtract of
// the chip's I and Q parts; no multiplier is needed.
//
// Interface and timing: `en` accumulates the current taps and pilot chip at
// the clock edge. When `last` is high with `en`, the chip is included, the
// totals appear on `corr` with a one-cycle `corr_valid` pulse, and the
// accumulators restart from zero. The description gives the structure
// (four submodules, one per input sequence); the period length is set by
// the enclosing equalizer.
module input_correlator
  import mimo_pkg::*;
#(
  parameter int unsigned TAPS = NTAPS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  last,
  input  chip_t taps [NRX][TAPS],
  input  chip_t css,
  output acc_t  corr [NRX][TAPS],
  output logic  corr_valid
);
  acc_t acc [NRX][TAPS];

  // chip times (+-1 +-j): (a + jb)(c + jd) with c, d = +-1
  function automatic acc_t mul_pm1(input chip_t x, input chip_t c, input acc_t a);
    acc_t r;
    logic signed [ACC_W-1:0] xr, xi;
    xr = ACC_W'(x.re);
    xi = ACC_W'(x.im);
    r.re = a.re + (c.re[CHIP_W-1] ? -xr : xr) - (c.im[CHIP_W-1] ? -xi : xi);
    r.im = a.im + (c.im[CHIP_W-1] ? -xr : xr) + (c.re[CHIP_W-1] ? -xi : xi);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NRX; m++)
        for (int k = 0; k < TAPS; k++) begin
          acc[m][k]  <= '0;
          corr[m][k] <= '0;
        end
      corr_valid <= 1'b0;
    end else begin
      corr_valid <= en && last;
      if (en) begin
        for (int m = 0; m < NRX; m++)
          for (int k = 0; k < TAPS; k++) begin
            if (last) begin
              corr[m][k] <= mul_pm1(taps[m][k], css, acc[m][k]);
              acc[m][k]  <= '0;
            end else begin
              acc[m][k]  <= mul_pm1(taps[m][k], css, acc[m][k]);
            end
          end
      end
    end
  end
endmodule
