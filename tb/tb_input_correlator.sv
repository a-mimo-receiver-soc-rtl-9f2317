// tb_input_correlator: random taps and +-1 +-j pilot chips over two
// periods of 24 chips; the dumped correlations are compared with complex
// products accumulated in the testbench, and corr_valid must pulse once per
// period.
module tb_input_correlator;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, last = 0, corr_valid;
  chip_t taps [NRX][NTAPS];
  chip_t css;
  acc_t corr [NRX][NTAPS];
  int checks = 0, failures = 0, pulses = 0;
  longint rr [NRX][NTAPS], ri [NRX][NTAPS];
  input_correlator dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (corr_valid) pulses++;
  initial begin
    css = '0;
    foreach (taps[m, k]) taps[m][k] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int per = 0; per < 2; per++) begin
      foreach (rr[m, k]) begin rr[m][k] = 0; ri[m][k] = 0; end
      for (int n = 0; n < 24; n++) begin
        css.re = $urandom_range(1) ? 8'sd1 : -8'sd1;
        css.im = $urandom_range(1) ? 8'sd1 : -8'sd1;
        foreach (taps[m, k]) begin
          taps[m][k].re = 8'($urandom); taps[m][k].im = 8'($urandom);
          rr[m][k] += taps[m][k].re * css.re - taps[m][k].im * css.im;
          ri[m][k] += taps[m][k].re * css.im + taps[m][k].im * css.re;
        end
        en = 1; last = (n == 23); @(negedge clk); en = 0; last = 0;
        if (n % 5 == 0) @(negedge clk);
      end
      foreach (rr[m, k]) begin
        checks++;
        if (corr[m][k].re != 32'(rr[m][k]) || corr[m][k].im != 32'(ri[m][k])) begin
          failures++; $display("FAIL period %0d m %0d k %0d", per, m, k);
        end
      end
    end
    checks++; if (pulses != 2) begin failures++; $display("FAIL pulses %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
