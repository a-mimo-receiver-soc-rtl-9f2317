// tb_nlms_error: random correlation results against a fixed expected
// amplitude; e must equal A - z (real) and -z (imaginary) one cycle after
// z_valid, and stay unchanged without z_valid.
module tb_nlms_error;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic z_valid = 0, e_valid;
  acc_t z, e;
  logic signed [31:0] amp = 32'sd32768;
  int checks = 0, failures = 0;
  nlms_error dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    z = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      int zr, zi;
      zr = $signed($urandom_range(100000)) - 50000; zi = $signed($urandom_range(100000)) - 50000;
      z.re = zr; z.im = zi; z_valid = 1; @(negedge clk); z_valid = 0;
      checks++;
      if (!e_valid || e.re != 32'(32768 - zr) || e.im != 32'(-zi)) begin failures++; $display("FAIL %0d", i); end
      z = '0; @(negedge clk);
      checks++; if (e_valid || e.re != 32'(32768 - zr)) begin failures++; $display("FAIL hold %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
