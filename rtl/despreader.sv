// despreader: turns the equalized chip stream of one transmit path into
// symbols. Each chip is multiplied by the conjugate scrambling chip; the
// result times the user's Walsh chip is summed over SF chips into a data
// symbol, and the same product with the all-ones pilot code is summed into
// a pilot symbol, which the flat channel estimation uses.
//
// Scaling: scrambling chips are +-1 +-j (|sc|^2 = 2), so both sums are
// divided by 2*SF (rounded arithmetic shift) and saturated to SYM_W bits.
// A chip of pilot amplitude 2**SYM_FRAC then gives a pilot symbol of
// 2**SYM_FRAC.
//
// Interface and timing: `en` accumulates the current chip; with `sym_last`
// the symbol completes and `data_sym`/`pilot_sym` are presented with a
// one-cycle `valid` pulse after the edge. SF and the scaling are this
// implementation's choices.
module despreader
  import mimo_pkg::*;
#(
  parameter int unsigned SF = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  sym_last,
  input  acc_t  y,
  input  logic  sc_i_neg,
  input  logic  sc_q_neg,
  input  logic  walsh_neg,
  output sym_t  data_sym,
  output sym_t  pilot_sym,
  output logic  valid
);
  localparam int unsigned SH = $clog2(SF) + 1;

  acc_t d_acc, p_acc, prod, d_nxt, p_nxt;

  function automatic logic signed [SYM_W-1:0] scale(input logic signed [ACC_W-1:0] v);
    logic signed [ACC_W-1:0] r;
    r = (v + ACC_W'(1 << (SH - 1))) >>> SH;
    if (r > ACC_W'(32767))       return 16'sd32767;
    else if (r < -ACC_W'(32768)) return -16'sd32768;
    else                         return r[SYM_W-1:0];
  endfunction

  always_comb begin
    logic signed [ACC_W-1:0] a, b;
    a = sc_i_neg ? -ACC_W'(1) : ACC_W'(1);
    b = sc_q_neg ? -ACC_W'(1) : ACC_W'(1);
    // y * conj(a + jb) = (yr*a + yi*b) + j(yi*a - yr*b)
    prod.re = y.re * a + y.im * b;
    prod.im = y.im * a - y.re * b;
    p_nxt.re = p_acc.re + prod.re;
    p_nxt.im = p_acc.im + prod.im;
    d_nxt.re = walsh_neg ? d_acc.re - prod.re : d_acc.re + prod.re;
    d_nxt.im = walsh_neg ? d_acc.im - prod.im : d_acc.im + prod.im;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_acc     <= '0;
      p_acc     <= '0;
      data_sym  <= '0;
      pilot_sym <= '0;
      valid     <= 1'b0;
    end else begin
      valid <= en && sym_last;
      if (en) begin
        if (sym_last) begin
          data_sym.re  <= scale(d_nxt.re);
          data_sym.im  <= scale(d_nxt.im);
          pilot_sym.re <= scale(p_nxt.re);
          pilot_sym.im <= scale(p_nxt.im);
          d_acc <= '0;
          p_acc <= '0;
        end else begin
          d_acc <= d_nxt;
          p_acc <= p_nxt;
        end
      end
    end
  end
endmodule
