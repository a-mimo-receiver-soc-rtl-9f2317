// mimo_receiver: digital baseband of a 4x4 MIMO CDMA receiver. Chips from
// four receive antennas pass through
//   input_buffer      -> four-lane FIFO of received chips
//   equalization      -> four adaptive chip equalizers, one per transmit
//                        antenna, each despreading its path into data and
//                        pilot symbols
//   flat_channel_est  -> 4x4 matrix H linking sent and equalized symbols
//   sphere_decoder    -> per-bit LLRs of every equalized symbol vector
//   turbo_decoder     -> decoded user bits
// The chain and its blocks follow the description; the glue between them
// is this implementation's:
//   - The sphere decoder starts on a symbol vector only once a first H is
//     available and only when it is idle; a vector arriving while it is
//     busy is dropped and counted (`sd_dropped`). At one chip per cycle a
//     16-chip symbol leaves enough time for one search of up to 16 path
//     entries only if chips arrive at most every other cycle.
//   - A serializer feeds the vector's LLRs (16 for 16QAM, 8 for QPSK) to
//     the turbo decoder one per cycle; LLRs arriving while the turbo
//     decoder is busy with a block are dropped and counted.
//   - `mode` selects QPSK or 16QAM at run time; it is sampled by the sphere
//     decoder at the start of each vector.
// Input chips are accepted with chip_valid/chip_ready; the equalizers read
// the buffer at most once per cycle. Decoded bits leave with dec_valid,
// dec_bit and dec_idx (bit position in the code block).
module mimo_receiver
  import mimo_pkg::*;
#(
  parameter int unsigned SF        = 16,
  parameter int unsigned PERIOD    = 256,
  parameter int unsigned DELAY     = 8,
  parameter int          INIT_VAL  = 8192,
  parameter int unsigned BUF_DEPTH = 64,
  parameter int unsigned K         = 128,
  parameter int unsigned ROUNDS    = 11
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  chip_valid,
  output logic                  chip_ready,
  input  chip_t                 chips [NRX],
  input  logic [$clog2(SF)-1:0] user_code,
  input  logic [5:0]            mu_shift,
  input  mod_e                  mode,
  output logic                  dec_valid,
  output logic                  dec_bit,
  output logic [$clog2(K)-1:0]  dec_idx,
  output logic                  block_done,
  output logic                  buf_overflow,
  output logic [15:0]           eq_updates,
  output logic [15:0]           h_updates,
  output logic [15:0]           sd_vectors,
  output logic [15:0]           sd_dropped,
  output logic [15:0]           llr_dropped,
  output logic                  h_singular
);
  // ------------------------------------------------------- input buffer
  logic  b_valid;
  chip_t b_chips [NRX];
  input_buffer #(.DEPTH(BUF_DEPTH)) u_inbuf (
    .clk, .rst_n, .in_valid(chip_valid), .in_ready(chip_ready), .in_chip(chips),
    .out_valid(b_valid), .out_ready(1'b1), .out_chip(b_chips), .overflow(buf_overflow));

  // -------------------------------------------------------- equalization
  sym_t       data_sym [NTX];
  sym_t       pilot_sym [NTX];
  logic [1:0] sym_pidx;
  logic       sym_valid;
  equalization #(.SF(SF), .PERIOD(PERIOD), .DELAY(DELAY), .INIT_VAL(INIT_VAL)) u_eq (
    .clk, .rst_n, .chip_valid(b_valid), .chips(b_chips), .user_code, .mu_shift,
    .data_sym, .pilot_sym, .sym_pidx, .sym_valid, .updates(eq_updates));

  // ------------------------------------------------ flat channel estimate
  sym_t h [NTX][NTX];
  logic h_valid, h_ok;
  flat_channel_est u_fce (
    .clk, .rst_n, .in_valid(sym_valid), .pilot_sym, .pidx(sym_pidx), .h, .h_valid);

  // ------------------------------------------------------ sphere decoder
  logic sd_ready, sd_start, sd_llr_valid;
  llr_t sd_llr [NBITS_MAX];
  logic [4:0] sd_nbits;
  lvl_t sd_hard [NTX];
  assign sd_start = sym_valid && h_ok && sd_ready;

  sphere_decoder u_sd (
    .clk, .rst_n, .start(sd_start), .ready(sd_ready), .mode, .h, .y(data_sym),
    .llr(sd_llr), .nbits(sd_nbits), .llr_valid(sd_llr_valid), .hard(sd_hard),
    .singular(h_singular));

  // ----------------------------------------------------------- serializer
  llr_t       ser [NBITS_MAX];
  logic [4:0] ser_cnt;
  logic       td_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_ok <= 1'b0; h_updates <= '0; sd_vectors <= '0; sd_dropped <= '0;
      llr_dropped <= '0; ser_cnt <= '0;
      for (int j = 0; j < NBITS_MAX; j++) ser[j] <= '0;
    end else begin
      if (h_valid) begin
        h_ok <= 1'b1;
        h_updates <= h_updates + 1'b1;
      end
      if (sym_valid && h_ok && !sd_ready) sd_dropped <= sd_dropped + 1'b1;
      if (sd_start) sd_vectors <= sd_vectors + 1'b1;
      if (ser_cnt != '0) begin
        if (!td_ready) llr_dropped <= llr_dropped + 1'b1;
        for (int j = 0; j < NBITS_MAX - 1; j++) ser[j] <= ser[j+1];
        ser_cnt <= ser_cnt - 1'b1;
      end
      if (sd_llr_valid) begin
        if (ser_cnt > 5'd1) llr_dropped <= llr_dropped + 16'(ser_cnt - 5'd1);
        ser     <= sd_llr;
        ser_cnt <= sd_nbits;
      end
    end
  end

  // -------------------------------------------------------- turbo decoder
  logic [3:0] td_round;
  logic       td_decoding;
  turbo_decoder #(.K(K), .ROUNDS(ROUNDS)) u_td (
    .clk, .rst_n, .in_valid(ser_cnt != '0), .in_llr(ser[0]), .in_ready(td_ready),
    .out_valid(dec_valid), .out_bit(dec_bit), .out_idx(dec_idx), .block_done,
    .round(td_round), .decoding(td_decoding));
endmodule
