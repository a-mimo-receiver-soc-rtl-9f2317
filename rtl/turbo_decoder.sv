// turbo_decoder: iterative decoder for the rate-1/3 parallel concatenated
// code (two 8-state recursive systematic encoders, octal 13/15, and a
// K-bit interleaver), punctured to rate 1/2. A single max-log MAP
// constituent decoder is time-multiplexed: even rounds act as decoder 1
// (natural order, parity 1), odd rounds as decoder 2 (interleaved order,
// parity 2). ROUNDS = 11 rounds are run, so the last one is decoder 1 and
// the decisions leave in natural order.
//
// Sliding window: the trellis is cut into windows of W = 16 columns. In
// slot s (W cycles) four windows are in flight at once:
//   gamma unit  writes the branch metrics of window s     into MEM[s%3]
//   pre-beta    runs backward over window s-1 from equal metrics, giving
//               the starting metrics of the beta recursion of window s-2
//   alpha unit  runs forward over window s-2, storing alpha in alpha mem
//   beta unit   runs backward over window s-3 with the LLR unit, pushing
//               the window's LLRs into the LIFO (last bit first)
// and the LIFO hands window s-4 out in bit order, writing the extrinsic
// LLRs to the interleaver RAM and, in the last round, the decisions to
// the output. The beta unit reads MEM[s%3] in the same cycle in which the
// gamma unit overwrites it; to make the read and the write hit the same
// word, window w is stored forward when (w/3) is even and backward when
// it is odd. Alpha mem has two banks, one per window parity.
// A round takes (K/W + 4) * W cycles; a block ROUNDS times that plus the
// 2K cycles needed to load it.
//
// From the description: one time-multiplexed decoder, sliding window of
// 16 columns, gamma, pre-beta, beta, alpha and LLR units, three branch
// metric memories, alpha memory, LIFO, interleaver RAM and ROM, 11
// rounds. This implementation's choices: the code, the block length K,
// the interleaver, the puncturing, the word widths, unterminated trellis
// (the last window starts its backward recursion from equal metrics), and
// a datapath without extra pipeline registers.
//
// Interface: LLRs (ln P(0)/P(1)) enter one per cycle with in_valid while
// in_ready is high, systematic/parity alternating. Decisions leave with
// out_valid, out_bit and out_idx; `block_done` pulses after the last one.
module turbo_decoder
  import mimo_pkg::*;
#(
  parameter int unsigned K      = 128,
  parameter int unsigned W      = 16,
  parameter int unsigned ROUNDS = 11,
  parameter int unsigned F1     = 15,
  parameter int unsigned F2     = 32,
  localparam int unsigned AW    = $clog2(K),
  localparam int unsigned NW    = K / W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  llr_t          in_llr,
  output logic          in_ready,
  output logic          out_valid,
  output logic          out_bit,
  output logic [AW-1:0] out_idx,
  output logic          block_done,
  output logic [3:0]    round,
  output logic          decoding
);
  localparam int unsigned CW = $clog2(W);
  localparam int unsigned SW = $clog2(NW + 4);
  localparam metric_t NEG    = -metric_t'(16'sd1024);

  // ---------------------------------------------------------------- load
  logic          dp_valid;
  llr_t          dp_sys, dp_p1, dp_p2;
  logic [AW-1:0] dp_idx;

  depuncture #(.K(K)) u_depunct (
    .clk, .rst_n, .clear(block_done), .in_valid(in_valid && in_ready), .in_llr,
    .out_valid(dp_valid), .sys(dp_sys), .p1(dp_p1), .p2(dp_p2), .idx(dp_idx));

  // ------------------------------------------------------------- control
  logic [SW-1:0] s;
  logic [CW-1:0] c;
  logic [1:0]    m3;        // s % 3
  logic          dec2;

  assign in_ready = !decoding && !block_done;
  assign dec2     = round[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decoding <= 1'b0; round <= '0; s <= '0; c <= '0; m3 <= '0; block_done <= 1'b0;
    end else begin
      block_done <= 1'b0;
      if (!decoding) begin
        if (dp_valid && dp_idx == AW'(K - 1)) begin
          decoding <= 1'b1;
          round <= '0; s <= '0; c <= '0; m3 <= '0;
        end
      end else begin
        c <= c + 1'b1;
        if (c == CW'(W - 1)) begin
          m3 <= (m3 == 2'd2) ? 2'd0 : m3 + 2'd1;
          s  <= s + 1'b1;
          if (s == SW'(NW + 3)) begin
            s  <= '0;
            m3 <= '0;
            if (round == 4'(ROUNDS - 1)) begin
              decoding   <= 1'b0;
              block_done <= 1'b1;
            end else begin
              round <= round + 1'b1;
            end
          end
        end
      end
    end
  end

  function automatic logic [1:0] mod3_minus(input logic [1:0] m, input int d);
    int r;
    r = (int'(m) - d + 3) % 3;
    return 2'(r);
  endfunction

  // storage direction of window w: backward when (w/3) is odd
  function automatic logic [CW-1:0] phys(input int w, input logic [CW-1:0] l);
    return ((w / 3) % 2 == 1) ? CW'(W - 1) - l : l;
  endfunction

  int unsigned si;
  assign si = int'(s);
  logic g_act, pb_act, a_act, b_act, o_act;
  assign g_act  = decoding && (si < NW);
  assign pb_act = decoding && (si >= 2) && (si <= NW);
  assign a_act  = decoding && (si >= 2) && (si <= NW + 1);
  assign b_act  = decoding && (si >= 3) && (si <= NW + 2);
  assign o_act  = decoding && (si >= 4) && (si <= NW + 3);

  // --------------------------------------------------- input side, gamma
  logic [AW-1:0] g_pos, g_ilv, o_pos, o_ilv;
  llr_t          r_sys, r_p1, r_p2, ext_rd, la;
  gamma_t        g_new;

  assign g_pos = AW'(si * W) + AW'(c);
  assign o_pos = AW'((si - 4) * W) + AW'(c);

  interleaver_rom #(.K(K), .F1(F1), .F2(F2)) u_ilv_rom (
    .addr0(g_pos), .addr1(o_pos), .data0(g_ilv), .data1(o_ilv));

  turbo_input_buffer #(.K(K)) u_inbuf (
    .clk, .we(dp_valid && !decoding), .waddr(dp_idx), .w_sys(dp_sys), .w_p1(dp_p1), .w_p2(dp_p2),
    .raddr_sys(dec2 ? g_ilv : g_pos), .raddr_par(g_pos), .r_sys, .r_p1, .r_p2);

  llr_t  o_ext, o_app;
  interleaver_ram #(.K(K)) u_ilv_ram (
    .clk, .we(o_act), .waddr(dec2 ? o_ilv : o_pos), .wdata(o_ext),
    .raddr(dec2 ? g_ilv : g_pos), .rdata(ext_rd));

  assign la = (round == 4'd0) ? '0 : ext_rd;

  gamma_unit u_gamma (.ls(r_sys), .la, .lp(dec2 ? r_p2 : r_p1), .g(g_new));

  // MEM1..MEM3: branch metrics of three windows
  gamma_t gmem [3][W];
  gamma_t g_pb, g_a, g_b;
  always_ff @(posedge clk)
    if (g_act) gmem[m3][phys(si, c)] <= g_new;

  assign g_pb = gmem[mod3_minus(m3, 1)][phys(si - 1, CW'(W - 1) - c)];
  assign g_a  = gmem[mod3_minus(m3, 2)][phys(si - 2, c)];
  assign g_b  = gmem[m3][phys(si - 3, CW'(W - 1) - c)];

  // ------------------------------------------------------------ pre-beta
  metric_t pb_reg [NSTATES];
  metric_t pb_in  [NSTATES];
  metric_t pb_out [NSTATES];
  always_comb
    for (int t = 0; t < NSTATES; t++) pb_in[t] = (c == '0) ? '0 : pb_reg[t];
  beta_unit u_prebeta (.b_in(pb_in), .g(g_pb), .b_out(pb_out));

  // --------------------------------------------------------------- alpha
  metric_t a_reg [NSTATES];
  metric_t a_out [NSTATES];
  metric_t amem  [2][W][NSTATES];
  alpha_unit u_alpha (.a_in(a_reg), .g(g_a), .a_out);

  // ---------------------------------------------------------------- beta
  metric_t b_reg [NSTATES];
  metric_t b_in  [NSTATES];
  metric_t b_out [NSTATES];
  logic    b_win_last;
  assign b_win_last = (si == NW + 2);
  always_comb
    for (int t = 0; t < NSTATES; t++)
      b_in[t] = (c != '0) ? b_reg[t] : (b_win_last ? '0 : pb_reg[t]);
  beta_unit u_beta (.b_in, .g(g_b), .b_out);

  // ----------------------------------------------------------------- LLR
  llr_t    l_app, l_ext;
  logic    b_bank;
  assign b_bank = 1'(si - 3);
  llr_unit u_llr (.alpha(amem[b_bank][CW'(W - 1) - c]), .beta(b_in), .g(g_b), .l_app, .l_ext);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NSTATES; t++) begin
        pb_reg[t] <= '0;
        b_reg[t]  <= '0;
        a_reg[t]  <= (t == 0) ? '0 : NEG;
      end
    end else begin
      if (decoding && si == 0)
        for (int t = 0; t < NSTATES; t++) a_reg[t] <= (t == 0) ? '0 : NEG;
      if (pb_act) pb_reg <= pb_out;
      if (a_act)  a_reg  <= a_out;
      if (b_act)  b_reg  <= b_out;
    end
  end

  always_ff @(posedge clk)
    if (a_act) amem[1'(si - 2)][c] <= a_reg;

  // ---------------------------------------------------------------- LIFO
  lifo #(.W(W)) u_lifo (
    .clk, .push(b_act), .push_bank(b_bank), .push_pos(CW'(W - 1) - c),
    .push_ext(l_ext), .push_app(l_app),
    .pop_bank(1'(si - 4)), .pop_pos(c), .pop_ext(o_ext), .pop_app(o_app));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_bit <= 1'b0; out_idx <= '0;
    end else begin
      out_valid <= o_act && (round == 4'(ROUNDS - 1));
      out_bit   <= o_app[LLR_W-1];
      out_idx   <= o_pos;
    end
  end
endmodule
