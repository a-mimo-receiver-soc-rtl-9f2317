// tb_matrix_enumeration: random unconstrained estimates in both modes.
// The testbench serves a random path table and checks, for every pair of
// path entries, the region and index in the look-up address and each
// candidate level against its own quantisation: nearest level, neighbour
// on the side of s' (turned at the edge), far flag beyond a quarter of the
// spacing. `last` must mark the eighth pair.
module tb_matrix_enumeration;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, step = 0, last;
  mod_e mode;
  sym_t s_est [NTX];
  logic [8:0] plm_addr0, plm_addr1;
  logic [7:0] plm_data0, plm_data1;
  lvl_t cand0 [NTX], cand1 [NTX];
  logic [7:0] tab [512];
  int checks = 0, failures = 0;
  assign plm_data0 = tab[plm_addr0];
  assign plm_data1 = tab[plm_addr1];
  matrix_enumeration dut (.*);
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  // reference quantiser in real arithmetic
  task automatic q(input int v, input int mx, output int lv, output int nb, output bit far);
    // ties between two levels go to the upper one
    real x, best;
    x = v / 64.0;
    best = 1e9; lv = 0;
    for (int l = -mx; l <= mx; l += 2) if ((x - l) * (x - l) <= best) begin best = (x - l) * (x - l); lv = l; end
    if (x >= lv) nb = (lv + 2 <= mx) ? lv + 2 : lv - 2;
    else         nb = (lv - 2 >= -mx) ? lv - 2 : lv + 2;
    far = ((x - lv) > 0.5) || ((lv - x) > 0.5);
  endtask
  initial begin
    foreach (tab[i]) tab[i] = 8'($urandom);
    foreach (s_est[a]) s_est[a] = '0;
    mode = MOD_16QAM;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 40; it++) begin
      int lv [4][2], nb [4][2], mx;
      bit fr [4][2];
      logic [3:0] rg;
      mode = (it % 2) ? MOD_QPSK : MOD_16QAM;
      mx = (mode == MOD_16QAM) ? 3 : 1;
      for (int a = 0; a < 4; a++) begin
        s_est[a].re = 16'($signed($urandom_range(560)) - 280 + 1);
        s_est[a].im = 16'($signed($urandom_range(560)) - 280 + 1);
        q(s_est[a].re, mx, lv[a][0], nb[a][0], fr[a][0]);
        q(s_est[a].im, mx, lv[a][1], nb[a][1], fr[a][1]);
        rg[a] = fr[a][0] | fr[a][1];
      end
      load = 1; @(negedge clk); load = 0;
      for (int p = 0; p < 8; p++) begin
        checks++;
        if (plm_addr0 != {mode, rg, 4'(2*p)} || plm_addr1 != {mode, rg, 4'(2*p+1)} || last != (p == 7)) begin
          failures++; $display("FAIL it %0d addr %h", it, plm_addr0);
        end
        for (int a = 0; a < 4; a++) begin
          checks++;
          if (cand0[a].re != 3'(plm_data0[2*a]   ? nb[a][0] : lv[a][0]) ||
              cand0[a].im != 3'(plm_data0[2*a+1] ? nb[a][1] : lv[a][1]) ||
              cand1[a].re != 3'(plm_data1[2*a]   ? nb[a][0] : lv[a][0]) ||
              cand1[a].im != 3'(plm_data1[2*a+1] ? nb[a][1] : lv[a][1])) begin
            failures++; $display("FAIL it %0d pair %0d ant %0d s=%0d,%0d got %0d,%0d lv %0d,%0d nb %0d,%0d d=%b", it, p, a, s_est[a].re, s_est[a].im, cand0[a].re, cand0[a].im, lv[a][0], lv[a][1], nb[a][0], nb[a][1], plm_data0);
          end
        end
        step = 1; @(negedge clk); step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
