// tb_coeff_update: loads random correlations into a testbench-side
// storage model, applies two NLMS errors and checks every coefficient
// against w + (e * conj(R)) >>> mu computed in the testbench, the reset
// value (single tap), and that a sweep takes exactly 64 busy cycles.
module tb_coeff_update;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic e_valid = 0, busy, missed;
  acc_t e, rd_data;
  logic [5:0] mu_shift = 6'd12;
  logic [5:0] rd_addr;
  coef_t coef [NRX][NTAPS];
  acc_t store [64];
  longint wr [64], wi [64];
  int checks = 0, failures = 0;
  assign rd_data = store[rd_addr];
  coeff_update #(.INIT_RX(2), .INIT_TAP(5), .INIT_VAL(4096)) dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic longint sat16(longint v); return v > 32767 ? 32767 : (v < -32768 ? -32768 : v); endfunction
  initial begin
    e = '0;
    foreach (store[i]) store[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      wr[i] = (i == 2 * 16 + 5) ? 4096 : 0; wi[i] = 0;
      checks++; if (coef[i/16][i%16].re != 16'(wr[i]) || coef[i/16][i%16].im != 0) begin failures++; $display("FAIL reset %0d", i); end
    end
    for (int r = 0; r < 2; r++) begin
      int nb;
      foreach (store[i]) begin
        store[i].re = $signed($urandom_range(20000)) - 10000;
        store[i].im = $signed($urandom_range(20000)) - 10000;
      end
      e.re = $signed($urandom_range(4000)) - 2000; e.im = $signed($urandom_range(4000)) - 2000;
      for (int i = 0; i < 64; i++) begin
        longint gr, gi;
        gr = longint'(e.re) * store[i].re + longint'(e.im) * store[i].im;
        gi = longint'(e.im) * store[i].re - longint'(e.re) * store[i].im;
        wr[i] = sat16(wr[i] + (gr >>> 12));
        wi[i] = sat16(wi[i] + (gi >>> 12));
      end
      e_valid = 1; @(negedge clk); e_valid = 0;
      nb = 0;
      while (busy) begin nb++; @(negedge clk); end
      checks++; if (nb != 64) begin failures++; $display("FAIL busy cycles %0d", nb); end
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (coef[i/16][i%16].re != 16'(wr[i]) || coef[i/16][i%16].im != 16'(wi[i])) begin
          failures++; $display("FAIL round %0d coef %0d", r, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
