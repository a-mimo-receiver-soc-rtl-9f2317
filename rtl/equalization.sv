// equalization: the equalization module of the receiver, four equalizers
// working side by side on the same received chips, one per transmit
// antenna. They differ only in the pilot pattern and the scrambling code
// of their transmit path (TX_IDX and the LFSR seed). All four run in lock
// step, so their symbols leave together: `sym_valid` marks a symbol vector
// (one symbol per transmit antenna) in `data_sym` and the matching pilot
// symbols in `pilot_sym`. The seeds are this implementation's choice.
module equalization
  import mimo_pkg::*;
#(
  parameter int unsigned SF       = 16,
  parameter int unsigned PERIOD   = 256,
  parameter int unsigned DELAY    = 8,
  parameter int          INIT_VAL = 4096
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  chip_valid,
  input  chip_t                 chips [NRX],
  input  logic [$clog2(SF)-1:0] user_code,
  input  logic [5:0]            mu_shift,
  output sym_t                  data_sym [NTX],
  output sym_t                  pilot_sym [NTX],
  output logic [1:0]            sym_pidx,
  output logic                  sym_valid,
  output logic [15:0]           updates
);
  localparam logic [14:0] SEEDS [4] = '{15'h0001, 15'h1234, 15'h2A5B, 15'h4F0D};

  logic [1:0]  pidx [NTX];
  logic        sv   [NTX];
  logic [15:0] upd  [NTX];

  for (genvar k = 0; k < NTX; k++) begin : g_eq
    equalizer #(.SF(SF), .PERIOD(PERIOD), .DELAY(DELAY), .TX_IDX(k),
                .SEED(SEEDS[k]), .INIT_VAL(INIT_VAL)) u_eq (
      .clk, .rst_n, .chip_valid, .chips, .user_code, .mu_shift,
      .data_sym(data_sym[k]), .pilot_sym(pilot_sym[k]), .sym_pidx(pidx[k]),
      .sym_valid(sv[k]), .updates(upd[k]));
  end

  assign sym_pidx  = pidx[0];
  assign sym_valid = sv[0];
  assign updates   = upd[0];
endmodule
