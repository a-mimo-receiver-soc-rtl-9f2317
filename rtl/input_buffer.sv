// input_buffer: temporary storage for the received chips of the four
// receive antennas. The chips of one sampling instant (one per antenna) are
// written together as one word and read out in arrival order, so the buffer
// is a first-in first-out queue of DEPTH four-lane words.
//
// Interface: valid/ready on both sides. A word is accepted when in_valid and
// in_ready are high at a clock edge and delivered when out_valid and
// out_ready are high. The read side is combinational from the memory (data
// is visible in the cycle out_valid rises, one cycle after the write).
// The description names the buffer and its purpose only; the depth and the
// handshake are this implementation's choices.
module input_buffer
  import mimo_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  chip_t in_chip [NRX],
  output logic  out_valid,
  input  logic  out_ready,
  output chip_t out_chip [NRX],
  output logic  overflow            // a word was offered while full
);
  localparam int unsigned AW = $clog2(DEPTH);

  chip_t       mem [DEPTH][NRX];
  logic [AW:0] wr_ptr, rd_ptr;
  logic        full, empty, do_wr, do_rd;

  assign full      = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign empty     = (wr_ptr == rd_ptr);
  assign in_ready  = !full;
  assign out_valid = !empty;
  assign do_wr     = in_valid && !full;
  assign do_rd     = out_ready && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= in_chip;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      overflow <= in_valid && full;
    end
  end

  assign out_chip = mem[rd_ptr[AW-1:0]];

endmodule
