// tb_interleaver_rom: reads all 128 entries through both ports; they must
// follow (15 i + 32 i^2) mod 128 and form a permutation.
module tb_interleaver_rom;
  logic [6:0] addr0, addr1, data0, data1;
  int checks = 0, failures = 0;
  bit seen [128];
  interleaver_rom dut (.*);
  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 128; i++) begin
      addr0 = 7'(i); addr1 = 7'(127 - i); #1;
      checks++;
      if (data0 != 7'((15 * i + 32 * i * i) % 128) || data1 != 7'((15 * (127 - i) + 32 * (127 - i) * (127 - i)) % 128) || seen[data0]) begin
        failures++; $display("FAIL %0d", i);
      end
      seen[data0] = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
