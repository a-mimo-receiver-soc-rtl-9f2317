// tb_output_correlator: random filter sums times random +-1 +-j pilot
// chips over three periods of 20 chips, compared with products summed in
// the testbench.
module tb_output_correlator;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, last = 0, z_valid;
  acc_t y, z;
  chip_t css;
  int checks = 0, failures = 0;
  output_correlator dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    y = '0; css = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int per = 0; per < 3; per++) begin
      longint zr, zi;
      zr = 0; zi = 0;
      for (int n = 0; n < 20; n++) begin
        y.re = 32'($signed($urandom_range(20000)) - 10000);
        y.im = 32'($signed($urandom_range(20000)) - 10000);
        css.re = $urandom_range(1) ? 8'sd1 : -8'sd1;
        css.im = $urandom_range(1) ? 8'sd1 : -8'sd1;
        zr += longint'(y.re) * css.re - longint'(y.im) * css.im;
        zi += longint'(y.re) * css.im + longint'(y.im) * css.re;
        en = 1; last = (n == 19); @(negedge clk); en = 0; last = 0;
      end
      checks++;
      if (!z_valid || z.re != 32'(zr) || z.im != 32'(zi)) begin failures++; $display("FAIL period %0d", per); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
