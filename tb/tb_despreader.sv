// tb_despreader: random equalized chips with random scrambling and Walsh
// chips over 6 symbols of 16 chips; data and pilot symbols are compared
// with sum(y * conj(sc) * w) / 32 and sum(y * conj(sc)) / 32 (rounded,
// computed in the testbench).
module tb_despreader;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, sym_last = 0, sc_i_neg = 0, sc_q_neg = 0, walsh_neg = 0, valid;
  acc_t y;
  sym_t data_sym, pilot_sym;
  int checks = 0, failures = 0;
  despreader #(.SF(16)) dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int rnd32(longint v); return int'((v + 16) >>> 5); endfunction
  initial begin
    y = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 6; s++) begin
      longint dr, di, pr, pi;
      dr = 0; di = 0; pr = 0; pi = 0;
      for (int n = 0; n < 16; n++) begin
        int a, b, w;
        y.re = $signed($urandom_range(2000)) - 1000; y.im = $signed($urandom_range(2000)) - 1000;
        sc_i_neg = 1'($urandom); sc_q_neg = 1'($urandom); walsh_neg = 1'($urandom);
        a = sc_i_neg ? -1 : 1; b = sc_q_neg ? -1 : 1; w = walsh_neg ? -1 : 1;
        pr += y.re * a + y.im * b; pi += y.im * a - y.re * b;
        dr += w * (y.re * a + y.im * b); di += w * (y.im * a - y.re * b);
        en = 1; sym_last = (n == 15); @(negedge clk); en = 0; sym_last = 0;
      end
      checks++;
      if (!valid || data_sym.re != 16'(rnd32(dr)) || data_sym.im != 16'(rnd32(di))
          || pilot_sym.re != 16'(rnd32(pr)) || pilot_sym.im != 16'(rnd32(pi))) begin
        failures++; $display("FAIL symbol %0d", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
