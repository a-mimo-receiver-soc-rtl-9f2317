// tb_lifo: pushes windows of 16 LLR pairs last position first into
// alternating banks while popping the previous window first position
// first; every popped pair must be the one pushed for that position.
module tb_lifo;
  import mimo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic push = 0, push_bank = 0, pop_bank = 0;
  logic [3:0] push_pos = 0, pop_pos = 0;
  llr_t push_ext, push_app, pop_ext, pop_app;
  llr_t re [8][16], ra [8][16];
  int checks = 0, failures = 0;
  lifo #(.W(16)) dut (.*);
  initial begin
    push_ext = 0; push_app = 0;
    foreach (re[w, i]) begin re[w][i] = 8'($urandom); ra[w][i] = 8'($urandom); end
    for (int w = 0; w <= 8; w++)
      for (int c = 0; c < 16; c++) begin
        @(negedge clk);
        push = (w < 8); push_bank = w[0]; push_pos = 4'(15 - c);
        if (w < 8) begin push_ext = re[w][15 - c]; push_app = ra[w][15 - c]; end
        pop_bank = ~w[0]; pop_pos = 4'(c);
        #1;
        if (w > 0) begin
          checks++;
          if (pop_ext != re[w-1][c] || pop_app != ra[w-1][c]) begin failures++; $display("FAIL w %0d c %0d", w, c); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
