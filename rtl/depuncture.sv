// depuncture: restores the three soft streams of the rate-1/3 turbo code
// from the punctured rate-1/2 stream delivered by the detector. The
// incoming LLRs come in pairs per information bit: the systematic LLR,
// then one parity LLR, taken from the first constituent encoder for even
// bit positions and from the second for odd ones. The parity that was not
// sent is replaced by a zero LLR (no information).
//
// Interface and timing: one LLR per `in_valid`; after the second LLR of a
// bit, `out_valid` pulses for one cycle with sys, p1, p2 and the bit index
// `idx`. `clear` restarts at bit 0. The description names the block; the
// puncturing pattern is this implementation's choice.
module depuncture
  import mimo_pkg::*;
#(
  parameter int unsigned K = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  llr_t                 in_llr,
  output logic                 out_valid,
  output llr_t                 sys,
  output llr_t                 p1,
  output llr_t                 p2,
  output logic [$clog2(K)-1:0] idx
);
  logic                 second;
  logic [$clog2(K)-1:0] bit_cnt;
  llr_t                 sys_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second <= 1'b0; bit_cnt <= '0; sys_q <= '0;
      out_valid <= 1'b0; sys <= '0; p1 <= '0; p2 <= '0; idx <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        second  <= 1'b0;
        bit_cnt <= '0;
      end else if (in_valid) begin
        if (!second) begin
          sys_q  <= in_llr;
          second <= 1'b1;
        end else begin
          second    <= 1'b0;
          out_valid <= 1'b1;
          sys       <= sys_q;
          p1        <= bit_cnt[0] ? '0 : in_llr;
          p2        <= bit_cnt[0] ? in_llr : '0;
          idx       <= bit_cnt;
          bit_cnt   <= bit_cnt + 1'b1;
        end
      end
    end
  end
endmodule
