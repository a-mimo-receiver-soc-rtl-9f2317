// tb_sphere_decoder: random near-diagonal channels, random symbol vectors
// in both modes and y = H s plus noise of up to +-6 LSB. The best vector
// found must be s, every LLR must have the sign of the sent bit (positive
// for 0) with the labelling worked out here, the number of bits must be
// 16 or 8, and each vector must take the same number of cycles from start
// to llr_valid (31 with the 16-entry path).
module tb_sphere_decoder;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, ready, llr_valid, singular;
  mod_e mode;
  sym_t h [NTX][NTX], y [NTX];
  llr_t llr [NBITS_MAX];
  logic [4:0] nbits;
  lvl_t hard [NTX];
  int checks = 0, failures = 0;
  sphere_decoder dut (.*);
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (h[r, c]) h[r][c] = '0;
    foreach (y[r]) y[r] = '0;
    mode = MOD_16QAM;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      int hr [4][4], hi [4][4], sr [4], si [4], mx, lat;
      bit b [16];
      mode = (it % 3 == 2) ? MOD_QPSK : MOD_16QAM;
      mx = (mode == MOD_16QAM) ? 3 : 1;
      for (int r = 0; r < 4; r++) begin
        sr[r] = (mx == 3) ? 2 * $urandom_range(3) - 3 : 2 * $urandom_range(1) - 1;
        si[r] = (mx == 3) ? 2 * $urandom_range(3) - 3 : 2 * $urandom_range(1) - 1;
        if (mx == 3) begin
          b[4*r] = sr[r] < 0; b[4*r+1] = (sr[r] == 3 || sr[r] == -3); b[4*r+2] = si[r] < 0; b[4*r+3] = (si[r] == 3 || si[r] == -3);
        end else begin
          b[2*r] = sr[r] < 0; b[2*r+1] = si[r] < 0;
        end
        for (int c = 0; c < 4; c++) begin
          hr[r][c] = (r == c) ? 56 + $urandom_range(16) : $signed($urandom_range(16)) - 8;
          hi[r][c] = $signed($urandom_range(16)) - 8;
          h[r][c].re = 16'(hr[r][c]); h[r][c].im = 16'(hi[r][c]);
        end
      end
      for (int r = 0; r < 4; r++) begin
        int ar, ai;
        ar = $signed($urandom_range(12)) - 6; ai = $signed($urandom_range(12)) - 6;
        for (int c = 0; c < 4; c++) begin
          ar += hr[r][c] * sr[c] - hi[r][c] * si[c];
          ai += hr[r][c] * si[c] + hi[r][c] * sr[c];
        end
        y[r].re = 16'(ar); y[r].im = 16'(ai);
      end
      while (!ready) @(negedge clk);
      start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!llr_valid) begin @(negedge clk); lat++; end
      checks++; if (lat != 31) begin failures++; $display("FAIL latency %0d", lat); end
      checks++; if (nbits != ((mx == 3) ? 16 : 8)) begin failures++; $display("FAIL nbits"); end
      for (int a = 0; a < 4; a++) begin
        checks++; if (hard[a].re != 3'(sr[a]) || hard[a].im != 3'(si[a])) begin failures++; $display("FAIL it %0d hard ant %0d", it, a); end
      end
      for (int j = 0; j < nbits; j++) begin
        checks++;
        if ((b[j] && llr[j] >= 0) || (!b[j] && llr[j] <= 0)) begin failures++; $display("FAIL it %0d llr %0d = %0d bit %0d", it, j, llr[j], b[j]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
