// lifo: reverses the order of the LLRs of one sliding window. The LLR
// unit produces a window's bits last to first (the beta recursion runs
// backwards); the LIFO hands them on first to last. Two banks of W entries
// alternate, so one window is written while the previous one is read.
//
// Interface and timing: push writes entry `push_pos` (the bit's offset
// within its window) of bank `push_bank`; reads are combinational from
// bank `pop_bank` at `pop_pos`. Each entry holds the extrinsic LLR and the
// a-posteriori LLR of a bit. The two-bank organisation is this
// implementation's choice.
module lifo
  import mimo_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic                 clk,
  input  logic                 push,
  input  logic                 push_bank,
  input  logic [$clog2(W)-1:0] push_pos,
  input  llr_t                 push_ext,
  input  llr_t                 push_app,
  input  logic                 pop_bank,
  input  logic [$clog2(W)-1:0] pop_pos,
  output llr_t                 pop_ext,
  output llr_t                 pop_app
);
  llr_t m_ext [2][W];
  llr_t m_app [2][W];

  always_ff @(posedge clk)
    if (push) begin
      m_ext[push_bank][push_pos] <= push_ext;
      m_app[push_bank][push_pos] <= push_app;
    end

  assign pop_ext = m_ext[pop_bank][pop_pos];
  assign pop_app = m_app[pop_bank][pop_pos];
endmodule
