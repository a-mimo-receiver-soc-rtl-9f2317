// tb_matrix_computation: random H, y and candidate vectors; both lanes'
// costs are compared with ||H s - y||^2 >> 6 computed in the testbench.
module tb_matrix_computation;
  import mimo_pkg::*;
  sym_t h [NTX][NTX], y [NTX];
  lvl_t cand [2][NTX];
  logic [31:0] cost [2];
  int checks = 0, failures = 0;
  matrix_computation dut (.*);
  initial begin
    for (int it = 0; it < 200; it++) begin
      foreach (h[r, c]) begin h[r][c].re = 16'($signed($urandom_range(400)) - 200); h[r][c].im = 16'($signed($urandom_range(400)) - 200); end
      foreach (y[r]) begin y[r].re = 16'($signed($urandom_range(4000)) - 2000); y[r].im = 16'($signed($urandom_range(4000)) - 2000); end
      foreach (cand[l, a]) begin cand[l][a].re = 3'(2 * $urandom_range(3) - 3); cand[l][a].im = 3'(2 * $urandom_range(3) - 3); end
      #1;
      for (int l = 0; l < 2; l++) begin
        longint acc;
        acc = 0;
        for (int m = 0; m < 4; m++) begin
          longint er, ei;
          er = -y[m].re; ei = -y[m].im;
          for (int k = 0; k < 4; k++) begin
            er += h[m][k].re * cand[l][k].re - h[m][k].im * cand[l][k].im;
            ei += h[m][k].re * cand[l][k].im + h[m][k].im * cand[l][k].re;
          end
          acc += er * er + ei * ei;
        end
        checks++;
        if (cost[l] != 32'(acc >> 6)) begin failures++; $display("FAIL it %0d lane %0d", it, l); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
