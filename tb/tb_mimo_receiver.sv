// tb_mimo_receiver: end-to-end test of the receiver at its default
// parameters. A transmitter model in this file turbo-encodes two random
// blocks of K bits (8-state RSC 13/15 pair, quadratic permutation
// interleaver, parity alternately from the two encoders), maps them to
// 16QAM (first block) and QPSK (second block, after a run-time mode
// switch), spreads each transmit antenna's symbols with the user's Walsh
// code, adds the antenna's pilot and scrambles them. A channel with
// cross-coupling between antennas, one echo chip and small noise produces
// the received chips, fed one every three cycles.
// Checks: every decoded bit of both blocks, the number of decoded bits,
// and that the coefficient update, channel estimation, sphere searches in
// both modes and the mode switch each happened.
module tb_mimo_receiver;
  import mimo_pkg::*;

  localparam int K   = 128;
  localparam int SF  = 16;
  localparam int CU  = 8;      // transmit chip amplitude unit
  localparam int UC  = 5;      // user Walsh code
  localparam int NSYM_A = 4 + 2 * K / 16;   // 4 symbols before the first H
  localparam int NSYM_B = 2 * K / 8;
  localparam int NSYM   = NSYM_A + NSYM_B + 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic chip_valid, chip_ready;
  chip_t chips [NRX];
  mod_e mode;
  logic dec_valid, dec_bit, block_done, buf_overflow, h_singular;
  logic [6:0] dec_idx;
  logic [15:0] eq_updates, h_updates, sd_vectors, sd_dropped, llr_dropped;

  mimo_receiver dut (
    .clk, .rst_n, .chip_valid, .chip_ready, .chips, .user_code(4'(UC)), .mu_shift(6'd20), .mode,
    .dec_valid, .dec_bit, .dec_idx, .block_done, .buf_overflow, .eq_updates, .h_updates,
    .sd_vectors, .sd_dropped, .llr_dropped, .h_singular);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ encoder
  bit ublk [2][K];
  bit coded [2][2*K];
  int pi_tab [K];

  function automatic void rsc(input bit u [K], output bit p [K]);
    bit a1, a2, a3, a;
    a1 = 0; a2 = 0; a3 = 0;
    for (int i = 0; i < K; i++) begin
      a = u[i] ^ a2 ^ a3;
      p[i] = a ^ a1 ^ a3;
      a3 = a2; a2 = a1; a1 = a;
    end
  endfunction

  task automatic encode(input int b);
    bit ui [K];
    bit p1 [K];
    bit p2 [K];
    for (int i = 0; i < K; i++) ui[i] = ublk[b][pi_tab[i]];
    rsc(ublk[b], p1);
    rsc(ui, p2);
    for (int i = 0; i < K; i++) begin
      coded[b][2*i]   = ublk[b][i];
      coded[b][2*i+1] = (i % 2 == 0) ? p1[i] : p2[i];
    end
  endtask

  // symbol levels [symbol][antenna] = {re, im}
  int lv_re [NSYM][4];
  int lv_im [NSYM][4];

  function automatic int lvl16(input bit sgn, input bit outer);
    return (sgn ? -1 : 1) * (outer ? 3 : 1);
  endfunction

  // -------------------------------------------------- chip generation
  logic [14:0] lfsr [4];
  localparam logic [14:0] SEEDS [4] = '{15'h0001, 15'h1234, 15'h2A5B, 15'h4F0D};
  int xprev_re [4], xprev_im [4];

  task automatic make_chip(input int n, output chip_t r [NRX]);
    int x_re [4], x_im [4];
    int sym, ci, m;
    sym = n / SF; ci = n % SF; m = sym % 4;
    for (int k = 0; k < 4; k++) begin
      int w, p, dr, di, sr, si;
      w  = ($countones(UC & ci) % 2) ? -1 : 1;
      p  = ($countones(k & m) % 2) ? -1 : 1;
      dr = (sym < NSYM ? lv_re[sym][k] : 1) * w + p;
      di = (sym < NSYM ? lv_im[sym][k] : 1) * w;
      sr = lfsr[k][14] ? -1 : 1;
      si = lfsr[k][7] ? -1 : 1;
      x_re[k] = CU * (dr * sr - di * si);
      x_im[k] = CU * (dr * si + di * sr);
      lfsr[k] = {lfsr[k][13:0], lfsr[k][14] ^ lfsr[k][13]};
    end
    for (int a = 0; a < 4; a++) begin
      int vr, vi;
      vr = x_re[a] + x_re[(a+1)%4] / 16 + xprev_re[a] / 8 + int'($urandom_range(2)) - 1;
      vi = x_im[a] + x_im[(a+1)%4] / 16 + xprev_im[a] / 8 + int'($urandom_range(2)) - 1;
      if (vr > 127) vr = 127; if (vr < -128) vr = -128;
      if (vi > 127) vi = 127; if (vi < -128) vi = -128;
      r[a].re = 8'(vr);
      r[a].im = 8'(vi);
    end
    for (int a = 0; a < 4; a++) begin xprev_re[a] = x_re[a]; xprev_im[a] = x_im[a]; end
  endtask

  task automatic send_chips(input int from, input int to);
    chip_t r [NRX];
    for (int n = from; n < to; n++) begin
      make_chip(n, r);
      @(negedge clk);
      while (!chip_ready) @(negedge clk);
      chips = r;
      chip_valid = 1;
      @(negedge clk);
      chip_valid = 0;
      @(negedge clk);
    end
  endtask

  // ------------------------------------------------------- monitoring
  int got [2];
  int cur_blk = 0;
  int blocks_done = 0;
  always @(posedge clk) if (rst_n && dec_valid) begin
    check(dec_bit == ublk[cur_blk][dec_idx], $sformatf("block %0d bit %0d", cur_blk, dec_idx));
    got[cur_blk]++;
  end
  always @(posedge clk) if (rst_n && block_done) begin
    blocks_done++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sd_q, upd_q;
    for (int i = 0; i < K; i++) pi_tab[i] = (15 * i + 32 * i * i) % K;
    for (int b = 0; b < 2; b++) begin
      for (int i = 0; i < K; i++) ublk[b][i] = 1'($urandom_range(1));
      encode(b);
    end
    for (int t = 0; t < NSYM; t++)
      for (int a = 0; a < 4; a++)
        if (t < 4) begin
          lv_re[t][a] = 1; lv_im[t][a] = -1;
        end else if (t < NSYM_A) begin
          int v;
          v = t - 4;
          lv_re[t][a] = lvl16(coded[0][v*16 + 4*a + 0], coded[0][v*16 + 4*a + 1]);
          lv_im[t][a] = lvl16(coded[0][v*16 + 4*a + 2], coded[0][v*16 + 4*a + 3]);
        end else if (t < NSYM_A + NSYM_B) begin
          int v;
          v = t - NSYM_A;
          lv_re[t][a] = coded[1][v*8 + 2*a + 0] ? -1 : 1;
          lv_im[t][a] = coded[1][v*8 + 2*a + 1] ? -1 : 1;
        end else begin
          lv_re[t][a] = 1; lv_im[t][a] = 1;
        end
    for (int k = 0; k < 4; k++) begin lfsr[k] = SEEDS[k]; xprev_re[k] = 0; xprev_im[k] = 0; end
    got[0] = 0; got[1] = 0;
    chip_valid = 0; mode = MOD_16QAM;
    for (int a = 0; a < NRX; a++) chips[a] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // block A: 16QAM
    send_chips(0, NSYM_A * SF + 8);
    repeat (60) @(posedge clk);
    upd_q = eq_updates;
    sd_q  = sd_vectors;
    wait (blocks_done == 1);
    check(got[0] == K, $sformatf("block A decoded %0d bits", got[0]));
    check(sd_q == NSYM_A - 4, $sformatf("16QAM searches %0d", sd_q));
    check(h_updates > 0, "channel estimate produced");
    check(upd_q > 0, "coefficient update happened");
    // mode switch, block B: QPSK
    @(negedge clk);
    mode = MOD_QPSK;
    cur_blk = 1;
    send_chips(NSYM_A * SF + 8, (NSYM_A + NSYM_B) * SF + 8);
    wait (blocks_done == 2);
    check(got[1] == K, $sformatf("block B decoded %0d bits", got[1]));
    check(sd_vectors - sd_q == NSYM_B, $sformatf("QPSK searches %0d", sd_vectors - sd_q));
    check(sd_dropped == 0 && !buf_overflow && !h_singular, "no dropped vectors, overflow or singular H");
    $display("mechanisms: eq_updates=%0d h_updates=%0d sd_vectors=%0d (16QAM %0d, QPSK %0d) mode_switches=1 blocks=%0d",
             eq_updates, h_updates, sd_vectors, sd_q, sd_vectors - sd_q, blocks_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
