// tb_cspilot_gen: runs the generator of transmit path 2 for 300 chips and
// compares scrambling, Walsh, pilot and C-SS chips with a model of the
// codes written in the testbench (LFSR x^15+x^14+1, Hadamard pilot signs,
// Walsh code by index parity), including symbol boundaries.
module tb_cspilot_gen;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic adv = 0, sc_i_neg, sc_q_neg, pil_neg, walsh_neg, sym_last;
  logic [3:0] user_code = 4'd11;
  logic [1:0] pil_sym;
  chip_t css;
  int checks = 0, failures = 0;
  cspilot_gen #(.SF(16), .TX_IDX(2), .SEED(15'h2A5B)) dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [14:0] l;
    l = 15'h2A5B;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int ci, m, p, a, b;
      ci = n % 16; m = (n / 16) % 4;
      p = ($countones(2 & m) % 2) ? -1 : 1;
      a = l[14] ? -1 : 1; b = l[7] ? -1 : 1;
      checks++;
      if (sc_i_neg != l[14] || sc_q_neg != l[7] || walsh_neg != ($countones(11 & ci) % 2)
          || pil_neg != (p < 0) || sym_last != (ci == 15) || pil_sym != 2'(m)
          || css.re != 8'(p * a) || css.im != 8'(-p * b)) begin
        failures++; $display("FAIL chip %0d", n);
      end
      adv = 1; @(negedge clk); adv = 0;
      l = {l[13:0], l[14] ^ l[13]};
      if (n % 7 == 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
