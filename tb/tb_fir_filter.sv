// tb_fir_filter: random complex coefficients and chips; the filter output
// is compared after every shift with a sum of products over a delay line
// kept in the testbench.
module tb_fir_filter;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic adv = 0;
  chip_t din, taps [NTAPS];
  coef_t coef [NTAPS];
  acc_t dout;
  int checks = 0, failures = 0;
  int dl_re [NTAPS], dl_im [NTAPS];
  fir_filter dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    din = '0;
    foreach (coef[k]) begin coef[k].re = 16'($urandom); coef[k].im = 16'($urandom); dl_re[k] = 0; dl_im[k] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      longint sr, si;
      din.re = 8'($urandom); din.im = 8'($urandom);
      adv = 1; @(negedge clk); adv = 0;
      for (int k = NTAPS-1; k > 0; k--) begin dl_re[k] = dl_re[k-1]; dl_im[k] = dl_im[k-1]; end
      dl_re[0] = din.re; dl_im[0] = din.im;
      sr = 0; si = 0;
      for (int k = 0; k < NTAPS; k++) begin
        sr += longint'(coef[k].re) * dl_re[k] - longint'(coef[k].im) * dl_im[k];
        si += longint'(coef[k].re) * dl_im[k] + longint'(coef[k].im) * dl_re[k];
      end
      checks++;
      if (dout.re != 32'(sr) || dout.im != 32'(si)) begin failures++; $display("FAIL n=%0d", n); end
      if (n == 50) foreach (coef[k]) begin coef[k].re = 16'($urandom); coef[k].im = 16'($urandom); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
