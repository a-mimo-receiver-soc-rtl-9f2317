// tb_correlation_storage: writes two random correlation sets and reads
// every entry back by address m*16+k; a cycle without `wr` must not change
// the contents.
module tb_correlation_storage;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr = 0;
  acc_t wr_data [NRX][NTAPS];
  logic [5:0] rd_addr = '0;
  acc_t rd_data;
  int checks = 0, failures = 0;
  correlation_storage dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    acc_t ref_d [NRX][NTAPS];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      foreach (wr_data[m, k]) begin wr_data[m][k].re = $urandom; wr_data[m][k].im = $urandom; end
      ref_d = wr_data;
      wr = 1; @(negedge clk); wr = 0;
      foreach (wr_data[m, k]) wr_data[m][k] = '0;
      @(negedge clk);
      for (int m = 0; m < NRX; m++) for (int k = 0; k < NTAPS; k++) begin
        rd_addr = 6'(m * NTAPS + k); #1;
        checks++; if (rd_data != ref_d[m][k]) begin failures++; $display("FAIL %0d %0d", m, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
