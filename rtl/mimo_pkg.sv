// mimo_pkg: constants, types and helper functions shared by the 4x4 MIMO
// CDMA receiver. The antenna counts, the 16-tap equalizer length, the
// 16-column turbo window and the 11 decoding rounds come from the design
// description; every word width and the fixed-point scaling here are this
// implementation's own choices.
//   - Received chips: 8-bit signed I and Q.
//   - Symbols after despreading, channel matrix entries and the
//     unconstrained estimate: 16-bit signed, SYM_FRAC fractional bits, so a
//     constellation level of 1 is 2**SYM_FRAC.
//   - Soft bits (LLRs): 8-bit signed, ln(P(b=0)/P(b=1)) convention.
package mimo_pkg;

  localparam int unsigned NTX      = 4;   // transmit antennas
  localparam int unsigned NRX      = 4;   // receive antennas
  localparam int unsigned NTAPS    = 16;  // FIR length per receive antenna
  localparam int unsigned CHIP_W   = 8;
  localparam int unsigned SYM_W    = 16;
  localparam int unsigned SYM_FRAC = 6;
  localparam int unsigned LLR_W    = 8;
  localparam int unsigned NSTATES  = 8;   // 3GPP-style RSC, memory 3
  localparam int unsigned NBITS_MAX = 16; // 4 antennas x 4 bits (16QAM)

  typedef enum logic {MOD_QPSK = 1'b0, MOD_16QAM = 1'b1} mod_e;

  typedef struct packed {
    logic signed [CHIP_W-1:0] re;
    logic signed [CHIP_W-1:0] im;
  } chip_t;

  typedef struct packed {
    logic signed [SYM_W-1:0] re;
    logic signed [SYM_W-1:0] im;
  } sym_t;

  typedef logic signed [LLR_W-1:0] llr_t;

  // Equalizer coefficients: 16-bit signed, COEF_FRAC fractional bits.
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 10;
  typedef struct packed {
    logic signed [COEF_W-1:0] re;
    logic signed [COEF_W-1:0] im;
  } coef_t;

  // Wide complex accumulator word used by filters and correlators.
  localparam int unsigned ACC_W = 32;
  typedef struct packed {
    logic signed [ACC_W-1:0] re;
    logic signed [ACC_W-1:0] im;
  } acc_t;

  // Constellation point of one transmit antenna as integer levels per
  // dimension: -3, -1, 1, 3 for 16QAM and -1, 1 for QPSK.
  typedef struct packed {
    logic signed [2:0] re;
    logic signed [2:0] im;
  } lvl_t;

  // Search-path length of the sphere decoder and its look-up memory size.
  localparam int unsigned PATH_LEN = 16;

  // Complex product of two values given as sign-extended 32-bit parts,
  // kept to the low ACC_W bits of each part.
  function automatic acc_t cmul(input logic signed [31:0] ar, input logic signed [31:0] ai,
                                input logic signed [31:0] br, input logic signed [31:0] bi);
    logic signed [63:0] pr, pi;
    acc_t r;
    pr = 64'(ar) * 64'(br) - 64'(ai) * 64'(bi);
    pi = 64'(ar) * 64'(bi) + 64'(ai) * 64'(br);
    r.re = pr[ACC_W-1:0];
    r.im = pi[ACC_W-1:0];
    return r;
  endfunction

  // Recursive systematic convolutional code, feedback 1+D^2+D^3,
  // feedforward 1+D+D^3 (octal 13/15). State bits s[2:0] = register
  // contents, s[0] the most recent.
  function automatic logic [2:0] rsc_next(input logic [2:0] s, input logic u);
    logic fb;
    fb = u ^ s[1] ^ s[2];
    return {s[1], s[0], fb};
  endfunction

  function automatic logic rsc_parity(input logic [2:0] s, input logic u);
    logic fb;
    fb = u ^ s[1] ^ s[2];
    return fb ^ s[0] ^ s[2];
  endfunction

  // Turbo decoder word types. Branch metrics per trellis step, for the
  // convention L = ln P(0)/P(1): gamma(u,p) = [u==0]*(Ls+La) + [p==0]*Lp,
  // so g11 is always zero and is not stored.
  localparam int unsigned GAM_W = 10;
  localparam int unsigned MET_W = 16;
  typedef struct packed {
    logic signed [GAM_W-1:0] g00;
    logic signed [GAM_W-1:0] g01;
    logic signed [GAM_W-1:0] g10;
  } gamma_t;
  typedef logic signed [MET_W-1:0] metric_t;
  typedef metric_t state_vec_t [NSTATES];

  function automatic logic signed [GAM_W-1:0] gamma_of(input gamma_t g, input logic u,
                                                       input logic p);
    case ({u, p})
      2'b00:   return g.g00;
      2'b01:   return g.g01;
      2'b10:   return g.g10;
      default: return '0;
    endcase
  endfunction

  // Saturate a wide signed value to LLR_W bits.
  function automatic llr_t sat_llr(input logic signed [31:0] v);
    if (v > 32'sd127)       return 8'sd127;
    else if (v < -32'sd127) return -8'sd127;
    else                    return v[LLR_W-1:0];
  endfunction

endpackage
