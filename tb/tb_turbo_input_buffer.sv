// tb_turbo_input_buffer: fills all K triplets with random LLRs, then reads
// systematic and parity words at independent random addresses.
module tb_turbo_input_buffer;
  import mimo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [6:0] waddr, raddr_sys, raddr_par;
  llr_t w_sys, w_p1, w_p2, r_sys, r_p1, r_p2;
  llr_t s [128], a [128], b [128];
  int checks = 0, failures = 0;
  turbo_input_buffer dut (.*);
  initial begin
    waddr = 0; raddr_sys = 0; raddr_par = 0; w_sys = 0; w_p1 = 0; w_p2 = 0;
    for (int i = 0; i < 128; i++) begin
      s[i] = 8'($urandom); a[i] = 8'($urandom); b[i] = 8'($urandom);
      @(negedge clk); waddr = 7'(i); w_sys = s[i]; w_p1 = a[i]; w_p2 = b[i]; we = 1;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 300; t++) begin
      raddr_sys = 7'($urandom); raddr_par = 7'($urandom); #1;
      checks++;
      if (r_sys != s[raddr_sys] || r_p1 != a[raddr_par] || r_p2 != b[raddr_par]) begin failures++; $display("FAIL %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
