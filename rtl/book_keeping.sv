// book_keeping: records the costs of all symbol vectors visited along the
// search path and turns them into soft bits. For every bit j of the symbol
// vector it keeps the smallest cost seen with b_j = 0 and with b_j = 1;
// at the end of the path
//   LLR_j = min_{b_j=1} J - min_{b_j=0} J    (ln P(b=0)/P(b=1))
// scaled by 2**-LLR_SHIFT and saturated to LLR_W bits. A bit value never
// visited keeps the largest cost, so its LLR saturates in favour of the
// value that was seen.
//
// Bit labelling (Gray): per antenna a and dimension, 16QAM uses a sign bit
// (1 for negative levels) and an outer bit (1 for |level| = 3); QPSK uses
// the sign bit only. 16QAM vector bits: 4a+0 = I sign, 4a+1 = I outer,
// 4a+2 = Q sign, 4a+3 = Q outer. QPSK: 2a+0 = I sign, 2a+1 = Q sign, the
// upper 8 LLRs are zero. The labelling and LLR_SHIFT are this
// implementation's choices; the LLR rule is the one of the description.
//
// Interface and timing: `clear` starts a new path; each `in_valid` takes
// LANES candidates with their costs; `finish` presents the LLRs on `llr`
// with a one-cycle `llr_valid` after the edge (the candidates offered in
// the same cycle are included). `best` is the lowest-cost vector seen.
module book_keeping
  import mimo_pkg::*;
#(
  parameter int unsigned LANES     = 2,
  parameter int unsigned LLR_SHIFT = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  mod_e        mode,
  input  logic        in_valid,
  input  lvl_t        cand [LANES][NTX],
  input  logic [31:0] cost [LANES],
  input  logic        finish,
  output llr_t        llr [NBITS_MAX],
  output logic        llr_valid,
  output lvl_t        best [NTX]
);
  logic [31:0] min0 [NBITS_MAX];
  logic [31:0] min1 [NBITS_MAX];
  logic [31:0] best_cost;

  function automatic logic [NBITS_MAX-1:0] label(input lvl_t s [NTX], input mod_e md);
    logic [NBITS_MAX-1:0] b;
    b = '0;
    for (int a = 0; a < NTX; a++)
      if (md == MOD_16QAM) begin
        b[4*a+0] = s[a].re[2];
        b[4*a+1] = (s[a].re == 3'sd3) || (s[a].re == -3'sd3);
        b[4*a+2] = s[a].im[2];
        b[4*a+3] = (s[a].im == 3'sd3) || (s[a].im == -3'sd3);
      end else begin
        b[2*a+0] = s[a].re[2];
        b[2*a+1] = s[a].im[2];
      end
    return b;
  endfunction

  // minima including the candidates of this cycle
  logic [31:0] n0 [NBITS_MAX];
  logic [31:0] n1 [NBITS_MAX];
  logic [31:0] nbest_cost;
  lvl_t        nbest [NTX];
  logic [NBITS_MAX-1:0] lab [LANES];
  always_comb begin
    for (int l = 0; l < LANES; l++) lab[l] = label(cand[l], mode);
    n0 = min0;
    n1 = min1;
    nbest_cost = best_cost;
    nbest = best;
    if (in_valid)
      for (int l = 0; l < LANES; l++) begin
        for (int j = 0; j < NBITS_MAX; j++)
          if (lab[l][j]) begin if (cost[l] < n1[j]) n1[j] = cost[l]; end
          else      begin if (cost[l] < n0[j]) n0[j] = cost[l]; end
        if (cost[l] < nbest_cost) begin
          nbest_cost = cost[l];
          nbest = cand[l];
        end
      end
  end

  // LLRs from the minima including the current candidates
  llr_t llr_n [NBITS_MAX];
  always_comb
    for (int j = 0; j < NBITS_MAX; j++) begin
      logic signed [33:0] d;
      d = 34'(n1[j]) - 34'(n0[j]);
      d = d >>> LLR_SHIFT;
      if (mode == MOD_QPSK && j >= 8) llr_n[j] = '0;
      else if (d > 34'sd127)          llr_n[j] = 8'sd127;
      else if (d < -34'sd127)         llr_n[j] = -8'sd127;
      else                            llr_n[j] = d[7:0];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NBITS_MAX; j++) begin
        min0[j] <= '1;
        min1[j] <= '1;
        llr[j]  <= '0;
      end
      for (int a = 0; a < NTX; a++) best[a] <= '0;
      best_cost <= '1;
      llr_valid <= 1'b0;
    end else begin
      llr_valid <= finish;
      if (clear) begin
        for (int j = 0; j < NBITS_MAX; j++) begin
          min0[j] <= '1;
          min1[j] <= '1;
        end
        best_cost <= '1;
      end else begin
        min0 <= n0;
        min1 <= n1;
        best_cost <= nbest_cost;
        best <= nbest;
      end
      if (finish)
        for (int j = 0; j < NBITS_MAX; j++) llr[j] <= llr_n[j];
    end
  end
endmodule
