// tb_path_lookup_memory: reads every path (2 modes x 16 regions x 16
// entries) through both ports and checks it against the ordering rule
// computed here: entries are distinct, start with the all-nearest vector,
// have non-decreasing squared distance (1 per flipped dimension of a far
// antenna, 3 of a near one), and every mask closer than the last entry is
// on the path.
module tb_path_lookup_memory;
  logic [8:0] addr0, addr1;
  logic [7:0] data0, data1;
  int checks = 0, failures = 0;
  path_lookup_memory dut (.*);
  function automatic int cost(int m, int rg);
    int c;
    c = 0;
    for (int b = 0; b < 8; b++) if (m[b]) c += rg[b/2] ? 1 : 3;
    return c;
  endfunction
  initial begin
    for (int md = 0; md < 2; md++)
      for (int rg = 0; rg < 16; rg++) begin
        int path [16];
        bit seen [256];
        int last_cost;
        foreach (seen[i]) seen[i] = 0;
        for (int i = 0; i < 16; i += 2) begin
          addr0 = 9'({md[0], rg[3:0], 4'(i)}); addr1 = 9'({md[0], rg[3:0], 4'(i + 1)}); #1;
          path[i] = data0; path[i+1] = data1;
        end
        checks++; if (path[0] != 0) begin failures++; $display("FAIL first entry"); end
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (seen[path[i]] || (i > 0 && cost(path[i], rg) < cost(path[i-1], rg))) begin
            failures++; $display("FAIL md %0d rg %0d entry %0d", md, rg, i);
          end
          seen[path[i]] = 1;
        end
        last_cost = cost(path[15], rg);
        for (int m = 0; m < 256; m++) begin
          if (cost(m, rg) < last_cost) begin
            checks++; if (!seen[m]) begin failures++; $display("FAIL md %0d rg %0d missing %0d", md, rg, m); end
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
