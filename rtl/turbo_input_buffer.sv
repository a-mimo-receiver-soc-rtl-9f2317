// turbo_input_buffer: holds the channel LLRs of one code block of K bits:
// systematic, parity 1 and parity 2, each as a K-entry memory. The decoder
// reads the systematic word at one address (natural or interleaved order)
// and both parity words at another (always natural order), every cycle.
//
// Interface and timing: one write port for a whole triplet; combinational
// reads. Block length K is this implementation's choice.
module turbo_input_buffer
  import mimo_pkg::*;
#(
  parameter int unsigned K = 128
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(K)-1:0] waddr,
  input  llr_t                 w_sys,
  input  llr_t                 w_p1,
  input  llr_t                 w_p2,
  input  logic [$clog2(K)-1:0] raddr_sys,
  input  logic [$clog2(K)-1:0] raddr_par,
  output llr_t                 r_sys,
  output llr_t                 r_p1,
  output llr_t                 r_p2
);
  llr_t m_sys [K];
  llr_t m_p1  [K];
  llr_t m_p2  [K];

  always_ff @(posedge clk)
    if (we) begin
      m_sys[waddr] <= w_sys;
      m_p1[waddr]  <= w_p1;
      m_p2[waddr]  <= w_p2;
    end

  assign r_sys = m_sys[raddr_sys];
  assign r_p1  = m_p1[raddr_par];
  assign r_p2  = m_p2[raddr_par];
endmodule
