// tb_flat_channel_est: pilot symbols are built from a random 4x4 complex
// channel matrix, q_k(m) = sum_j H[k][j] * p_j(m) with the Hadamard pilot
// signs; after a full cycle of four pilot symbols the estimate must equal
// H exactly. A cycle entered in the middle (pidx 2, 3) must not produce an
// estimate.
module tb_flat_channel_est;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, h_valid;
  sym_t pilot_sym [NTX], h [NTX][NTX];
  logic [1:0] pidx = 0;
  int checks = 0, failures = 0, nvalid = 0;
  int hr [4][4], hi [4][4];
  flat_channel_est dut (.*);
  always @(posedge clk) if (h_valid) nvalid++;
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic send(int m);
    for (int k = 0; k < 4; k++) begin
      int sr, si;
      sr = 0; si = 0;
      for (int j = 0; j < 4; j++) begin
        int p;
        p = ($countones(j & m) % 2) ? -1 : 1;
        sr += p * hr[k][j]; si += p * hi[k][j];
      end
      pilot_sym[k].re = 16'(sr); pilot_sym[k].im = 16'(si);
    end
    pidx = 2'(m); in_valid = 1; @(negedge clk); in_valid = 0; @(negedge clk);
  endtask
  initial begin
    foreach (pilot_sym[k]) pilot_sym[k] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      foreach (hr[k, j]) begin hr[k][j] = $signed($urandom_range(200)) - 100; hi[k][j] = $signed($urandom_range(200)) - 100; end
      if (r == 0) begin send(2); send(3); checks++; if (nvalid != 0) begin failures++; $display("FAIL early estimate"); end end
      for (int m = 0; m < 4; m++) send(m);
      foreach (hr[k, j]) begin
        checks++;
        if (h[k][j].re != 16'(hr[k][j]) || h[k][j].im != 16'(hi[k][j])) begin failures++; $display("FAIL r%0d h[%0d][%0d]", r, k, j); end
      end
    end
    checks++; if (nvalid != 3) begin failures++; $display("FAIL estimates %0d", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
