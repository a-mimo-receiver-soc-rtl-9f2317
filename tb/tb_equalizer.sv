// tb_equalizer: one equalizer (transmit path 1) on a channel where receive
// antenna 1 hears transmit antenna 1 and the other receive antennas hear
// the other transmit antennas. Random 16QAM levels are sent on all four
// antennas; every data symbol must come out as level * 64 and every pilot
// symbol as the path's pilot sign * 64 (within one LSB, as
// the coefficient updates may move the taps slightly), with the pilot
// index running 0..3. At least one coefficient update must happen.
module tb_equalizer;
  import mimo_pkg::*;
  localparam int NS = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic chip_valid = 0, sym_valid;
  chip_t chips [NRX];
  sym_t data_sym, pilot_sym;
  logic [1:0] sym_pidx;
  logic [15:0] updates;
  int checks = 0, failures = 0;
  int lre [NS][4], lim [NS][4];
  equalizer #(.SF(16), .PERIOD(64), .DELAY(8), .TX_IDX(1), .SEED(15'h1234), .INIT_VAL(8192)) dut (
    .clk, .rst_n, .chip_valid, .chips, .user_code(4'd3), .mu_shift(6'd40),
    .data_sym, .pilot_sym, .sym_pidx, .sym_valid, .updates);
  tx_model #(.CU(8)) tx ();
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic bit near(int a, int b); return (a - b) <= 1 && (b - a) <= 1; endfunction
  int t = 0;
  always @(posedge clk) if (rst_n && sym_valid && t < NS) begin
    for (int k = 1; k < 2; k++) begin
      int p;
      p = ($countones(k & (t % 4)) % 2) ? -64 : 64;
      checks++;
      if (!near(data_sym.re, 64 * lre[t][k]) || !near(data_sym.im, 64 * lim[t][k])
          || !near(pilot_sym.re, p) || !near(pilot_sym.im, 0) || sym_pidx != 2'(t % 4)) begin
        failures++;
        $display("FAIL sym %0d ant %0d: %0d %0d exp %0d %0d", t, k, data_sym.re, data_sym.im, 64*lre[t][k], 64*lim[t][k]);
      end
    end
    t++;
  end
  initial begin
    foreach (lre[s, k]) begin lre[s][k] = 2 * $urandom_range(3) - 3; lim[s][k] = 2 * $urandom_range(3) - 3; end
    foreach (chips[a]) chips[a] = '0;
    tx.reset_codes();
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < NS * 16 + 8; n++) begin
      int xr [4], xi [4], a_re [4], a_im [4];
      for (int k = 0; k < 4; k++) begin
        a_re[k] = (n / 16 < NS) ? lre[n / 16][k] : 1;
        a_im[k] = (n / 16 < NS) ? lim[n / 16][k] : 1;
      end
      tx.next_chip(n, 3, a_re, a_im, xr, xi);
      for (int a = 0; a < 4; a++) begin chips[a].re = 8'(xr[a]); chips[a].im = 8'(xi[a]); end
      chip_valid = 1; @(negedge clk); chip_valid = 0; @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++; if (t != NS) begin failures++; $display("FAIL symbols %0d", t); end
    checks++; if (updates < 4) begin failures++; $display("FAIL updates %0d", updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
