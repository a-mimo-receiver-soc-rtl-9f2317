// tb_unconstrained_solver: random near-diagonal complex channel matrices
// (diagonal about 64, off-diagonal up to +-12) and random 16QAM symbol
// vectors s; with y = H s the solver must return s * 64 within two LSBs,
// 21 cycles after start. A zero matrix must be reported as singular.
module tb_unconstrained_solver;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done, busy, singular;
  sym_t h [NTX][NTX], y [NTX], s_est [NTX];
  int checks = 0, failures = 0;
  unconstrained_solver dut (.*);
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic bit near(int a, int b); return (a - b) <= 2 && (b - a) <= 2; endfunction
  initial begin
    foreach (h[r, c]) h[r][c] = '0;
    foreach (y[r]) y[r] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 40; it++) begin
      int hr [4][4], hi [4][4], sr [4], si [4], lat;
      for (int r = 0; r < 4; r++) begin
        sr[r] = 2 * $urandom_range(3) - 3; si[r] = 2 * $urandom_range(3) - 3;
        for (int c = 0; c < 4; c++) begin
          hr[r][c] = (r == c) ? 50 + $urandom_range(30) : $signed($urandom_range(24)) - 12;
          hi[r][c] = $signed($urandom_range(24)) - 12;
          h[r][c].re = 16'(hr[r][c]); h[r][c].im = 16'(hi[r][c]);
        end
      end
      for (int r = 0; r < 4; r++) begin
        int ar, ai;
        ar = 0; ai = 0;
        for (int c = 0; c < 4; c++) begin
          ar += hr[r][c] * sr[c] - hi[r][c] * si[c];
          ai += hr[r][c] * si[c] + hi[r][c] * sr[c];
        end
        y[r].re = 16'(ar); y[r].im = 16'(ai);
      end
      start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++; if (lat != 21) begin failures++; $display("FAIL latency %0d", lat); end
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (!near(s_est[r].re, 64 * sr[r]) || !near(s_est[r].im, 64 * si[r]) || singular) begin
          failures++; $display("FAIL it %0d r %0d: %0d %0d exp %0d %0d", it, r, s_est[r].re, s_est[r].im, 64*sr[r], 64*si[r]);
        end
      end
    end
    foreach (h[r, c]) h[r][c] = '0;
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++; if (!singular) begin failures++; $display("FAIL singular flag"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
