// tb_depuncture: a stream of 2K random LLRs with gaps; each bit's triplet
// must carry the systematic LLR and the parity LLR in p1 for even bits,
// p2 for odd bits, zero in the other, with the bit index counting up.
module tb_depuncture;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, in_valid = 0, out_valid;
  llr_t in_llr, sys, p1, p2;
  logic [4:0] idx;
  int checks = 0, failures = 0, nout = 0;
  llr_t st [64];
  depuncture #(.K(32)) dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (idx != 5'(nout) || sys != st[2*nout]
        || p1 != ((nout % 2 == 0) ? st[2*nout+1] : 8'sd0)
        || p2 != ((nout % 2 == 1) ? st[2*nout+1] : 8'sd0)) begin failures++; $display("FAIL bit %0d", nout); end
    nout++;
  end
  initial begin
    in_llr = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      st[i] = 8'($urandom);
      in_llr = st[i]; in_valid = 1; @(negedge clk); in_valid = 0;
      if (i % 3 == 0) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++; if (nout != 32) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
