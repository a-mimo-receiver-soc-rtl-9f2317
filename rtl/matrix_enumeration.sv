// matrix_enumeration: determines the next candidate symbol vectors along
// the search path. From the unconstrained estimate s' it finds, for every
// transmit antenna and dimension, the nearest constellation level q, the
// direction d (+1/-1) of the adjacent level on the side of s' (turned
// around at the edge of the constellation) and whether s' is far from q.
// These give the region address of the path look-up memory; each path
// entry (flip mask) then yields the candidate level q + 2d where its bit is
// set and q elsewhere.
//
// Two identical datapaths work in parallel: every `step` advances the path
// index by two and presents entries idx and idx+1 as cand0 and cand1.
//
// Levels are -3..3 for 16QAM and -1..1 for QPSK (mode selects). s' has
// SYM_FRAC fractional bits, a level being 2**SYM_FRAC, so the spacing is
// 2**(SYM_FRAC+1) and "far" means |s' - q| > 2**(SYM_FRAC-1).
//
// Interface and timing: `load` latches s' and mode and resets the index;
// cand0/cand1 are combinational from the index; `last` marks the final
// pair. The region rule and the flip-mask format are this implementation's
// choices; the two parallel datapaths follow the description.
module matrix_enumeration
  import mimo_pkg::*;
#(
  parameter int unsigned PLEN = PATH_LEN,
  localparam int unsigned IW  = $clog2(PLEN),
  localparam int unsigned AW  = 1 + 4 + IW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  mod_e          mode,
  input  sym_t          s_est [NTX],
  input  logic          step,
  output logic [AW-1:0] plm_addr0,
  output logic [AW-1:0] plm_addr1,
  input  logic [7:0]    plm_data0,
  input  logic [7:0]    plm_data1,
  output lvl_t          cand0 [NTX],
  output lvl_t          cand1 [NTX],
  output logic          last
);
  mod_e            mode_q;
  logic [3:0]      region;
  logic [2:0]      lvl  [NTX][2];  // nearest level, 2's complement
  logic            dneg [NTX][2];  // direction -1
  logic [IW-1:0]   idx;

  // nearest level / direction / far flag of one dimension
  task automatic quantize(input logic signed [SYM_W-1:0] v, input mod_e md,
                          output logic signed [2:0] q, output logic dn, output logic far);
    logic signed [SYM_W-1:0] f, d, qv;
    logic signed [3:0]       qq, mx;
    mx = (md == MOD_16QAM) ? 4'sd3 : 4'sd1;
    f  = v >>> (SYM_FRAC + 1);
    if (f > 16'sd1)        qq = 4'sd3;
    else if (f < -16'sd2)  qq = -4'sd3;
    else                   qq = 4'(2 * f + 1);
    if (qq > mx)  qq = mx;
    if (qq < -mx) qq = -mx;
    qv  = SYM_W'(qq) <<< SYM_FRAC;
    d   = v - qv;
    dn  = d[SYM_W-1];
    if (dn && qq == -mx)  dn = 1'b0;
    if (!dn && qq == mx)  dn = 1'b1;
    far = (d > 16'sd0 ? d : -d) > 16'sd2 ** (SYM_FRAC - 1);
    q   = qq[2:0];
  endtask

  // quantized estimate, taken into the registers on `load`
  logic signed [2:0] q_n [NTX][2];
  logic              d_n [NTX][2];
  logic              f_n [NTX][2];
  always_comb
    for (int a = 0; a < NTX; a++) begin
      quantize(s_est[a].re, mode, q_n[a][0], d_n[a][0], f_n[a][0]);
      quantize(s_est[a].im, mode, q_n[a][1], d_n[a][1], f_n[a][1]);
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= MOD_QPSK;
      region <= '0;
      idx    <= '0;
      for (int a = 0; a < NTX; a++)
        for (int b = 0; b < 2; b++) begin
          lvl[a][b]  <= '0;
          dneg[a][b] <= 1'b0;
        end
    end else if (load) begin
      mode_q <= mode;
      idx    <= '0;
      for (int a = 0; a < NTX; a++) begin
        lvl[a][0]  <= q_n[a][0];  dneg[a][0] <= d_n[a][0];
        lvl[a][1]  <= q_n[a][1];  dneg[a][1] <= d_n[a][1];
        region[a]  <= f_n[a][0] | f_n[a][1];
      end
    end else if (step) begin
      idx <= idx + IW'(2);
    end
  end

  assign plm_addr0 = {mode_q, region, idx};
  assign plm_addr1 = {mode_q, region, idx | IW'(1)};
  assign last      = (idx == IW'(PLEN - 2));

  function automatic logic signed [2:0] pick(input logic [2:0] q, input logic dn, input logic f);
    if (!f)      return q;
    else if (dn) return q - 3'd2;
    else         return q + 3'd2;
  endfunction

  always_comb
    for (int a = 0; a < NTX; a++) begin
      cand0[a].re = pick(lvl[a][0], dneg[a][0], plm_data0[2*a]);
      cand0[a].im = pick(lvl[a][1], dneg[a][1], plm_data0[2*a+1]);
      cand1[a].re = pick(lvl[a][0], dneg[a][0], plm_data1[2*a]);
      cand1[a].im = pick(lvl[a][1], dneg[a][1], plm_data1[2*a+1]);
    end
endmodule
