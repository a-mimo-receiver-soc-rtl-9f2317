// cspilot_gen: code generator for one transmit path of the receiver.
// It produces, chip by chip, the path's scrambling chip, the pilot sign, the
// selected user's Walsh chip and the C-SS pilot: the complex conjugate of the
// spread and scrambled pilot, used by both correlators of an equalizer.
//
// How it works: a 15-bit Fibonacci LFSR (x^15 + x^14 + 1) gives two bits per
// chip, one for the I and one for the Q sign of a +-1 +-j scrambling chip.
// The pilot is spread with the all-ones Walsh code; its symbol sign follows
// row TX_IDX of a 4x4 Hadamard matrix, so the four transmit paths carry
// pilots that are orthogonal over four symbols. User data uses Walsh code
// `user_code` of length SF (Sylvester ordering, chip = parity(code & index)).
// The design description states only that the paths differ in pilot and
// scrambling code; the LFSR, the Hadamard pilot pattern and SF are this
// implementation's choices.
//
// Timing: outputs describe the current chip and are combinational from the
// state; `adv` moves to the next chip at the clock edge. `sym_last` flags
// the last chip of a symbol, `pil_sym` is the pilot symbol index 0..3.
module cspilot_gen
  import mimo_pkg::*;
#(
  parameter int unsigned SF     = 16,
  parameter int unsigned TX_IDX = 0,
  parameter logic [14:0] SEED   = 15'h0001
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  adv,
  input  logic [$clog2(SF)-1:0] user_code,
  output logic                  sc_i_neg,   // scrambling chip I sign (1 = -1)
  output logic                  sc_q_neg,   // scrambling chip Q sign
  output logic                  pil_neg,    // pilot symbol sign
  output logic                  walsh_neg,  // user Walsh chip sign
  output chip_t                 css,        // conj(pilot * scramble), +-1 +-j
  output logic                  sym_last,
  output logic [1:0]            pil_sym
);
  logic [14:0]             lfsr;
  logic [$clog2(SF)-1:0]   chip_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr     <= SEED;
      chip_idx <= '0;
      pil_sym  <= '0;
    end else if (adv) begin
      lfsr     <= {lfsr[13:0], lfsr[14] ^ lfsr[13]};
      chip_idx <= chip_idx + 1'b1;
      if (chip_idx == $clog2(SF)'(SF - 1)) pil_sym <= pil_sym + 1'b1;
    end
  end

  always_comb begin
    logic [1:0] tx2;
    tx2       = 2'(TX_IDX);
    sc_i_neg  = lfsr[14];
    sc_q_neg  = lfsr[7];
    pil_neg   = ^(tx2 & pil_sym);
    walsh_neg = ^(user_code & chip_idx);
    sym_last  = (chip_idx == $clog2(SF)'(SF - 1));
    // p * (a + jb) conjugated = p*a - j*p*b
    css.re    = (pil_neg ^ sc_i_neg)  ? -8'sd1 : 8'sd1;
    css.im    = (pil_neg ^ sc_q_neg)  ? 8'sd1  : -8'sd1;
  end

endmodule
