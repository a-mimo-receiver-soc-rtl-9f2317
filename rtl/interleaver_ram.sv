// interleaver_ram: memory of the extrinsic LLRs exchanged between the two
// half-iterations of turbo decoding, in natural bit order. The decoder
// reads and writes it at pi(i) while it works as the second constituent
// decoder and at i while it works as the first, which carries out the
// interleaving and de-interleaving in place.
//
// Interface and timing: one combinational read port and one write port,
// written at the clock edge.
module interleaver_ram
  import mimo_pkg::*;
#(
  parameter int unsigned K = 128
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(K)-1:0] waddr,
  input  llr_t                 wdata,
  input  logic [$clog2(K)-1:0] raddr,
  output llr_t                 rdata
);
  llr_t mem [K];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
