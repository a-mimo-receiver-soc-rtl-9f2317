// equalizer: adaptive chip-level equalizer for one transmit path. Four
// 16-tap complex FIR filters, one per receive antenna, are summed; the sum
// is despread into symbols of that transmit path. The filter coefficients
// are adapted with a correlation-based NLMS scheme: the input correlator
// correlates every filter tap with the C-SS pilot, the output correlator
// correlates the filter sum with the same pilot, the difference between
// that result and the expected pilot amplitude is the NLMS error, and the
// coefficient update moves every coefficient by error * conj(input
// correlation). This structure follows the description of the receiver;
// the numbers not given there are this implementation's choices:
//   - DELAY: decision delay in chips. Code generation (pilot, scrambling,
//     Walsh) runs DELAY chips behind the received chips, so the equalizer
//     estimates x(n-DELAY); the reset coefficients put INIT_VAL on tap
//     DELAY of receive antenna TX_IDX.
//   - PERIOD: chips per correlation period, one coefficient update each.
//   - The expected pilot correlation amplitude is 2 * 2**SYM_FRAC * PERIOD,
//     i.e. a pilot chip maps to 2**SYM_FRAC after equalization.
// Filter output scaling: y = (sum of the FIR outputs) >>> COEF_FRAC.
//
// Interface and timing: one chip vector is taken per cycle with
// `chip_valid`; the filters shift it in at that edge and the rest of the
// datapath works on it in the next cycle. Symbols leave the despreader with
// a one-cycle `sym_valid` pulse, with `sym_pidx` the pilot symbol index
// (0..3) of that symbol. `updates` counts completed coefficient updates.
module equalizer
  import mimo_pkg::*;
#(
  parameter int unsigned SF       = 16,
  parameter int unsigned PERIOD   = 256,
  parameter int unsigned DELAY    = 8,
  parameter int unsigned TX_IDX   = 0,
  parameter logic [14:0] SEED     = 15'h0001,
  parameter int          INIT_VAL = 4096
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  chip_valid,
  input  chip_t                 chips [NRX],
  input  logic [$clog2(SF)-1:0] user_code,
  input  logic [5:0]            mu_shift,
  output sym_t                  data_sym,
  output sym_t                  pilot_sym,
  output logic [1:0]            sym_pidx,
  output logic                  sym_valid,
  output logic [15:0]           updates
);
  localparam logic signed [ACC_W-1:0] AMP = ACC_W'(2 * (1 << SYM_FRAC) * PERIOD);
  localparam int unsigned N = NRX * NTAPS;

  chip_t  taps [NRX][NTAPS];
  acc_t   fir_out [NRX];
  coef_t  coef [NRX][NTAPS];
  acc_t   ysum, y;
  logic   proc, run;
  logic [$clog2(DELAY+1)-1:0]  dcnt;
  logic [$clog2(PERIOD)-1:0]   pcnt;
  logic   per_last;

  // code generator outputs
  logic   sc_i_neg, sc_q_neg, pil_neg, walsh_neg, sym_last;
  logic [1:0] pil_sym;
  chip_t  css;

  for (genvar m = 0; m < NRX; m++) begin : g_fir
    fir_filter #(.TAPS(NTAPS)) u_fir (
      .clk, .rst_n, .adv(chip_valid), .din(chips[m]),
      .coef(coef[m]), .taps(taps[m]), .dout(fir_out[m]));
  end

  always_comb begin
    ysum = '0;
    for (int m = 0; m < NRX; m++) begin
      ysum.re = ysum.re + fir_out[m].re;
      ysum.im = ysum.im + fir_out[m].im;
    end
    y.re = ysum.re >>> COEF_FRAC;
    y.im = ysum.im >>> COEF_FRAC;
  end

  // chip timing: proc is the cycle after a chip entered the filters; run
  // goes high once DELAY chips have been received.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      proc <= 1'b0;
      dcnt <= '0;
      pcnt <= '0;
    end else begin
      proc <= chip_valid;
      if (proc && !run) dcnt <= dcnt + 1'b1;
      if (proc && run)  pcnt <= per_last ? '0 : pcnt + 1'b1;
    end
  end
  assign run      = (dcnt == $bits(dcnt)'(DELAY));
  assign per_last = (pcnt == $clog2(PERIOD)'(PERIOD - 1));

  cspilot_gen #(.SF(SF), .TX_IDX(TX_IDX), .SEED(SEED)) u_gen (
    .clk, .rst_n, .adv(proc && run), .user_code,
    .sc_i_neg, .sc_q_neg, .pil_neg, .walsh_neg, .css, .sym_last, .pil_sym);

  acc_t corr [NRX][NTAPS];
  logic corr_valid;
  input_correlator #(.TAPS(NTAPS)) u_icorr (
    .clk, .rst_n, .en(proc && run), .last(per_last), .taps, .css,
    .corr, .corr_valid);

  logic [$clog2(N)-1:0] rd_addr;
  acc_t rd_data;
  correlation_storage #(.TAPS(NTAPS)) u_store (
    .clk, .rst_n, .wr(corr_valid), .wr_data(corr), .rd_addr, .rd_data);

  acc_t z, e;
  logic z_valid, e_valid, busy, missed;
  output_correlator u_ocorr (
    .clk, .rst_n, .en(proc && run), .last(per_last), .y, .css, .z, .z_valid);

  nlms_error u_err (.clk, .rst_n, .z_valid, .z, .amp(AMP), .e, .e_valid);

  coeff_update #(.TAPS(NTAPS), .INIT_RX(TX_IDX), .INIT_TAP(DELAY), .INIT_VAL(INIT_VAL)) u_upd (
    .clk, .rst_n, .e_valid, .e, .mu_shift, .rd_addr, .rd_data, .coef, .busy, .missed);

  despreader #(.SF(SF)) u_desp (
    .clk, .rst_n, .en(proc && run), .sym_last, .y, .sc_i_neg, .sc_q_neg, .walsh_neg,
    .data_sym, .pilot_sym, .valid(sym_valid));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_pidx <= '0;
      updates  <= '0;
    end else begin
      if (proc && run && sym_last) sym_pidx <= pil_sym;
      if (e_valid) updates <= updates + 1'b1;
    end
  end
endmodule
