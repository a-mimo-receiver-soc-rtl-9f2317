// coeff_update: coefficient register file and update engine of one
// equalizer. It holds the NRX x TAPS complex FIR coefficients and, once per
// correlation period, moves each of them along the error gradient:
//   w[m][k] <- w[m][k] + (e * conj(R[m][k])) >>> mu_shift
// where e is the NLMS error of the output correlator and R the stored
// input-correlator result for the same antenna and delay. Because the
// output correlation is z = sum w * R (scaled), this step reduces |A - z|^2.
// The step size is a power of two chosen at run time (`mu_shift`) and
// plays the role of the normalisation: it should be set from the
// correlation period and the input power.
//
// How it works: the coefficients are updated serially, one per cycle, so
// one multiplier pair serves all 64; the FIRs keep using the coefficients
// while the update sweeps through them. Reset loads a single tap,
// INIT_RX/INIT_TAP, with INIT_VAL and clears the rest.
//
// Interface and timing: `e_valid` starts a sweep of NRX*TAPS cycles
// (`busy` high); the sweep drives `rd_addr` into the correlation storage
// and reads `rd_data` in the same cycle. An `e_valid` during a sweep is
// ignored (counted by `missed`). The serial sweep, the reset value and the
// power-of-two step are this implementation's choices.
module coeff_update
  import mimo_pkg::*;
#(
  parameter int unsigned TAPS     = NTAPS,
  parameter int unsigned INIT_RX  = 0,
  parameter int unsigned INIT_TAP = 8,
  parameter int          INIT_VAL = 4096,
  localparam int unsigned N       = NRX * TAPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 e_valid,
  input  acc_t                 e,
  input  logic [5:0]           mu_shift,
  output logic [$clog2(N)-1:0] rd_addr,
  input  acc_t                 rd_data,
  output coef_t                coef [NRX][TAPS],
  output logic                 busy,
  output logic                 missed
);
  acc_t                 e_q;
  logic [$clog2(N)-1:0] idx;
  logic signed [63:0]   gr, gi;
  logic signed [63:0]   nr, ni;
  coef_t                cur;

  assign rd_addr = idx;
  assign cur     = coef[idx / TAPS][idx % TAPS];

  function automatic logic signed [COEF_W-1:0] sat_coef(input logic signed [63:0] v);
    if (v > 64'sd32767)       return 16'sd32767;
    else if (v < -64'sd32768) return -16'sd32768;
    else                      return v[COEF_W-1:0];
  endfunction

  always_comb begin
    gr = 64'(e_q.re) * 64'(rd_data.re) + 64'(e_q.im) * 64'(rd_data.im);
    gi = 64'(e_q.im) * 64'(rd_data.re) - 64'(e_q.re) * 64'(rd_data.im);
    nr = 64'(cur.re) + (gr >>> mu_shift);
    ni = 64'(cur.im) + (gi >>> mu_shift);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NRX; m++)
        for (int k = 0; k < TAPS; k++) begin
          coef[m][k].re <= (m == INIT_RX && k == INIT_TAP) ? COEF_W'(INIT_VAL) : '0;
          coef[m][k].im <= '0;
        end
      e_q    <= '0;
      idx    <= '0;
      busy   <= 1'b0;
      missed <= 1'b0;
    end else begin
      missed <= e_valid && busy;
      if (!busy) begin
        if (e_valid) begin
          e_q  <= e;
          idx  <= '0;
          busy <= 1'b1;
        end
      end else begin
        coef[idx / TAPS][idx % TAPS].re <= sat_coef(nr);
        coef[idx / TAPS][idx % TAPS].im <= sat_coef(ni);
        if (idx == $clog2(N)'(N - 1)) busy <= 1'b0;
        else                          idx  <= idx + 1'b1;
      end
    end
  end
endmodule
