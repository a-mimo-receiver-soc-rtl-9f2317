// tb_turbo_decoder: three blocks of K = 128 random bits are turbo encoded
// here (RSC 13/15 pair, quadratic permutation interleaver, parity taken
// alternately from the two encoders) and sent as noisy LLRs: magnitude 30
// plus uniform noise of +-38, so about a tenth of the received bits has the
// wrong sign. Every decoded bit must be right, some systematic LLRs must
// have been wrong (so the decoder corrected errors), the decoder must run
// 11 rounds, and a block must take 11 * (K/16 + 4) * 16 cycles from its
// last input LLR to the end of the output.
module tb_turbo_decoder;
  import mimo_pkg::*;
  localparam int K = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_bit, block_done, decoding;
  llr_t in_llr;
  logic [6:0] out_idx;
  logic [3:0] round;
  int checks = 0, failures = 0, nout = 0, max_round = 0;
  bit u [K], ub [3][K];
  turbo_decoder dut (.*);
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++; if (out_bit != ub[nout / K][out_idx]) begin failures++; $display("FAIL bit %0d", out_idx); end
    checks++; if (out_idx != 7'(nout % K)) begin failures++; $display("FAIL order %0d", out_idx); end
    nout++;
  end
  always @(posedge clk) if (rst_n && decoding && int'(round) > max_round) max_round = int'(round);
  function automatic void rsc(input bit x [K], output bit p [K]);
    bit a1, a2, a3, a;
    a1 = 0; a2 = 0; a3 = 0;
    for (int i = 0; i < K; i++) begin
      a = x[i] ^ a2 ^ a3; p[i] = a ^ a1 ^ a3; a3 = a2; a2 = a1; a1 = a;
    end
  endfunction
  function automatic llr_t noisy(bit b);
    int v;
    v = (b ? -30 : 30) + $signed($urandom_range(76)) - 38;
    return 8'(v);
  endfunction
  initial begin
    int wrong;
    in_llr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    wrong = 0;
    for (int blk = 0; blk < 3; blk++) begin
      bit ui [K], p1 [K], p2 [K];
      int t0, lat;
      for (int i = 0; i < K; i++) begin u[i] = 1'($urandom); ub[blk][i] = u[i]; end
      for (int i = 0; i < K; i++) ui[i] = u[(15 * i + 32 * i * i) % K];
      rsc(u, p1); rsc(ui, p2);
      while (!in_ready) @(negedge clk);
      for (int i = 0; i < K; i++) begin
        llr_t ls;
        ls = noisy(u[i]);
        if ((ls < 0) != u[i]) wrong++;
        in_llr = ls; in_valid = 1; @(negedge clk);
        in_llr = noisy((i % 2 == 0) ? p1[i] : p2[i]); @(negedge clk);
      end
      in_valid = 0;
      t0 = 0;
      while (!block_done) begin @(negedge clk); t0++; end
      lat = t0;
      $display("block %0d latency %0d outputs %0d", blk, lat, nout);
      checks++; if (lat != 11 * (K / 16 + 4) * 16 + 1) begin failures++; $display("FAIL block latency %0d", lat); end
      @(negedge clk);
      checks++; if (nout != (blk + 1) * K) begin failures++; $display("FAIL outputs %0d", nout); end
    end
    checks++; if (wrong == 0) begin failures++; $display("FAIL no channel errors to correct"); end
    checks++; if (max_round != 10) begin failures++; $display("FAIL rounds %0d", max_round + 1); end
    $display("channel sign errors corrected: %0d", wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
