// tb_interleaver_ram: random writes in permuted order, then reads of
// every address; a read in the cycle of a write to the same address must
// still return the old value.
module tb_interleaver_ram;
  import mimo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [6:0] waddr = 0, raddr = 0;
  llr_t wdata, rdata;
  llr_t m [128];
  int checks = 0, failures = 0;
  interleaver_ram dut (.*);
  initial begin
    wdata = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); waddr = 7'((37 * i) % 128); wdata = 8'($urandom); m[waddr] = wdata; we = 1;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 128; i++) begin
      raddr = 7'(i); #1; checks++; if (rdata != m[i]) begin failures++; $display("FAIL %0d", i); end
    end
    @(negedge clk); waddr = 7'd5; raddr = 7'd5; wdata = ~m[5]; we = 1; #1;
    checks++; if (rdata != m[5]) begin failures++; $display("FAIL read-before-write"); end
    @(negedge clk); we = 0; #1;
    checks++; if (rdata != ~m[5]) begin failures++; $display("FAIL write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
