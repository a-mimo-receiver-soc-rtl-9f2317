// sphere_decoder: soft-output MIMO detector. For one equalizer output
// vector y and flat channel matrix H it searches a fixed-length path of
// candidate symbol vectors around the unconstrained estimate s' = H^-1 y
// and returns one log-likelihood ratio per transmitted bit.
//
// Structure (as in the description): unconstrained_solver computes s';
// matrix_enumeration picks two candidates per cycle from the path stored
// in path_lookup_memory for the region of s'; matrix_computation evaluates
// J(s) = ||Hs - y||^2 for both; book_keeping keeps the per-bit minima and
// forms the LLRs.
//
// Interface and timing: `start` (with `ready` high) latches h, y and mode.
// The solver takes 21 cycles, the search PLEN/2 cycles (two candidates per
// cycle), and `llr_valid` pulses two cycles after the last pair, so one
// vector takes about 21 + PLEN/2 + 4 cycles. `llr` holds 16 LLRs for 16QAM
// (4 bits x 4 antennas) or 8 for QPSK (`nbits`). `hard` is the best vector
// found.
module sphere_decoder
  import mimo_pkg::*;
#(
  parameter int unsigned PLEN      = PATH_LEN,
  parameter int unsigned LLR_SHIFT = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       ready,
  input  mod_e       mode,
  input  sym_t       h [NTX][NTX],
  input  sym_t       y [NTX],
  output llr_t       llr [NBITS_MAX],
  output logic [4:0] nbits,
  output logic       llr_valid,
  output lvl_t       hard [NTX],
  output logic       singular
);
  localparam int unsigned AW = 1 + 4 + $clog2(PLEN);

  logic last;
  typedef enum logic [1:0] {S_IDLE, S_SOLVE, S_SEARCH, S_WAIT} st_e;
  st_e  st;
  sym_t h_q [NTX][NTX];
  sym_t y_q [NTX];
  mod_e mode_q;

  sym_t s_est [NTX];
  logic sol_done, sol_busy, sol_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      mode_q <= MOD_QPSK;
      for (int r = 0; r < NTX; r++) begin
        y_q[r] <= '0;
        for (int c = 0; c < NTX; c++) h_q[r][c] <= '0;
      end
    end else begin
      unique case (st)
        S_IDLE:   if (start) begin
                    h_q <= h; y_q <= y; mode_q <= mode;
                    st <= S_SOLVE;
                  end
        S_SOLVE:  if (sol_done) st <= S_SEARCH;
        S_SEARCH: if (last) st <= S_WAIT;
        S_WAIT:   if (llr_valid) st <= S_IDLE;
        default:  st <= S_IDLE;
      endcase
    end
  end

  // solver starts the cycle after the inputs are latched
  logic solve_go;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) solve_go <= 1'b0;
    else        solve_go <= (st == S_IDLE) && start;
  assign sol_start = solve_go;
  assign ready     = (st == S_IDLE);
  assign nbits     = (mode_q == MOD_16QAM) ? 5'd16 : 5'd8;

  unconstrained_solver u_solver (
    .clk, .rst_n, .start(sol_start), .h(h_q), .y(y_q),
    .s_est, .done(sol_done), .busy(sol_busy), .singular);

  logic [AW-1:0] a0, a1;
  logic [7:0]    d0, d1;
  lvl_t          cand [2][NTX];
  logic          searching;
  assign searching = (st == S_SEARCH);

  path_lookup_memory #(.PLEN(PLEN)) u_plm (.addr0(a0), .addr1(a1), .data0(d0), .data1(d1));

  matrix_enumeration #(.PLEN(PLEN)) u_enum (
    .clk, .rst_n, .load(sol_done), .mode(mode_q), .s_est, .step(searching),
    .plm_addr0(a0), .plm_addr1(a1), .plm_data0(d0), .plm_data1(d1),
    .cand0(cand[0]), .cand1(cand[1]), .last);

  logic [31:0] cost [2];
  matrix_computation #(.LANES(2)) u_comp (.h(h_q), .y(y_q), .cand, .cost);

  book_keeping #(.LANES(2), .LLR_SHIFT(LLR_SHIFT)) u_book (
    .clk, .rst_n, .clear(sol_done), .mode(mode_q), .in_valid(searching), .cand, .cost,
    .finish(searching && last), .llr, .llr_valid, .best(hard));
endmodule
