// tb_input_buffer: writes random four-lane chip words into the FIFO,
// reads them back in order and compares; fills it completely to check
// that in_ready drops and overflow is reported, then drains it.
module tb_input_buffer;
  import mimo_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, overflow;
  chip_t in_chip [NRX], out_chip [NRX];
  int checks = 0, failures = 0;
  chip_t q [64][NRX];
  int wi = 0, ri = 0;
  input_buffer #(.DEPTH(D)) dut (.*);
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic push();
    chip_t w [NRX];
    foreach (w[a]) begin w[a].re = 8'($urandom); w[a].im = 8'($urandom); end
    @(negedge clk); in_chip = w; in_valid = 1; @(negedge clk); in_valid = 0; q[wi] = w; wi++;
  endtask
  task automatic pop();
    chip_t w [NRX];
    @(negedge clk);
    chk(out_valid, "out_valid");
    w = q[ri]; ri++;
    for (int a = 0; a < NRX; a++) begin if (out_chip[a] != w[a]) $display("got %h exp %h", out_chip[a], w[a]); chk(out_chip[a] == w[a], "data"); end
    out_ready = 1; @(negedge clk); out_ready = 0;
  endtask
  initial begin
    foreach (in_chip[a]) in_chip[a] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    chk(!out_valid, "empty after reset");
    repeat (5) push(); repeat (3) pop();
    repeat (6) push();
    chk(!in_ready, "full: in_ready low");
    @(negedge clk); in_valid = 1; @(negedge clk); in_valid = 0; @(negedge clk);
    chk(overflow == 0, "overflow pulse is one cycle");
    repeat (8) pop();
    chk(!out_valid, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && in_valid && !in_ready) begin
    @(posedge clk); checks++; if (!overflow) begin failures++; $display("FAIL overflow flag"); end
  end
endmodule
