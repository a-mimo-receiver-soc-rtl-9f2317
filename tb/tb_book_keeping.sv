// tb_book_keeping: paths of eight candidate pairs with random levels and
// costs, in both modes; the LLRs must equal (min cost with bit 1 - min
// cost with bit 0) >> 2, saturated to +-127, with the Gray labelling
// (sign bit, outer bit) worked out here, and `best` the cheapest vector.
module tb_book_keeping;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, in_valid = 0, finish = 0, llr_valid;
  mod_e mode;
  lvl_t cand [2][NTX], best [NTX];
  logic [31:0] cost [2];
  llr_t llr [NBITS_MAX];
  int checks = 0, failures = 0;
  book_keeping dut (.*);
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (cand[l, a]) cand[l][a] = '0;
    cost[0] = 0; cost[1] = 0; mode = MOD_16QAM;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 30; it++) begin
      longint m0 [16], m1 [16], bc;
      int bre [4], bim [4], nb;
      mode = (it % 2) ? MOD_QPSK : MOD_16QAM;
      nb = (mode == MOD_16QAM) ? 16 : 8;
      foreach (m0[j]) begin m0[j] = 64'hFFFF_FFFF; m1[j] = 64'hFFFF_FFFF; end
      bc = 64'hFFFF_FFFF;
      clear = 1; @(negedge clk); clear = 0;
      for (int p = 0; p < 8; p++) begin
        for (int l = 0; l < 2; l++) begin
          bit b [16];
          int mx;
          mx = (mode == MOD_16QAM) ? 3 : 1;
          for (int a = 0; a < 4; a++) begin
            int r, i;
            r = (mx == 3) ? 2 * $urandom_range(3) - 3 : 2 * $urandom_range(1) - 1;
            i = (mx == 3) ? 2 * $urandom_range(3) - 3 : 2 * $urandom_range(1) - 1;
            cand[l][a].re = 3'(r); cand[l][a].im = 3'(i);
            if (mx == 3) begin
              b[4*a] = r < 0; b[4*a+1] = (r == 3 || r == -3); b[4*a+2] = i < 0; b[4*a+3] = (i == 3 || i == -3);
            end else begin
              b[2*a] = r < 0; b[2*a+1] = i < 0;
            end
          end
          cost[l] = $urandom_range(2000);
          for (int j = 0; j < nb; j++)
            if (b[j]) begin if (cost[l] < m1[j]) m1[j] = cost[l]; end
            else      begin if (cost[l] < m0[j]) m0[j] = cost[l]; end
          if (cost[l] < bc) begin bc = cost[l]; for (int a = 0; a < 4; a++) begin bre[a] = cand[l][a].re; bim[a] = cand[l][a].im; end end
        end
        in_valid = 1; finish = (p == 7); @(negedge clk); in_valid = 0; finish = 0;
      end
      checks++; if (!llr_valid) begin failures++; $display("FAIL llr_valid"); end
      for (int j = 0; j < 16; j++) begin
        longint d;
        d = (j < nb) ? ((m1[j] - m0[j]) >>> 2) : 0;
        if (d > 127) d = 127; if (d < -127) d = -127;
        checks++; if (llr[j] != 8'(d)) begin failures++; $display("FAIL it %0d bit %0d: %0d exp %0d", it, j, llr[j], d); end
      end
      for (int a = 0; a < 4; a++) begin
        checks++; if (best[a].re != 3'(bre[a]) || best[a].im != 3'(bim[a])) begin failures++; $display("FAIL best"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
