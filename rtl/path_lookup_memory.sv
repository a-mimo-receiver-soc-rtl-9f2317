// path_lookup_memory (PLM): read-only memory holding the search paths of
// the sphere decoder, one path per modulation and region of the
// unconstrained estimate s'.
//
// Path format: entry i of a path is an 8-bit flip mask. Bit 2a (2a+1)
// tells whether the I (Q) level of transmit antenna a is taken from the
// constellation point nearest to s' (0) or from the adjacent point on the
// side of s' (1). Region: 4 bits, bit a set when s' of antenna a lies more
// than a quarter of the point spacing away from its nearest point in I or
// Q ("far").
//
// Contents, computed at elaboration by `build_path`: the path lists the
// PATH_LEN flip masks in the order in which a circle growing around the
// region's representative point crosses them. Moving one dimension of a
// far antenna to its neighbour costs 1 unit of squared distance, of a near
// antenna 3 units (for offsets of 3/8 and 1/8 of the spacing: (1-2d)
// times the spacing squared), and equal costs keep the lower mask first.
// The same rule yields the same table for QPSK and 16QAM; the modulation
// still selects its own half of the memory, so either half can be
// reprogrammed without touching the other.
//
// Interface and timing: two combinational read ports, one for each
// enumeration datapath. Address = {mode, region, index}.
module path_lookup_memory
  import mimo_pkg::*;
#(
  parameter int unsigned PLEN = PATH_LEN,
  localparam int unsigned IW  = $clog2(PLEN),
  localparam int unsigned AW  = 1 + 4 + IW
) (
  input  logic [AW-1:0] addr0,
  input  logic [AW-1:0] addr1,
  output logic [7:0]    data0,
  output logic [7:0]    data1
);
  typedef logic [7:0] rom_t [2**AW];

  function automatic int unsigned mask_cost(input logic [7:0] m, input logic [3:0] region);
    int unsigned c;
    c = 0;
    for (int b = 0; b < 8; b++)
      if (m[b]) c += region[b/2] ? 1 : 3;
    return c;
  endfunction

  function automatic rom_t build_path();
    rom_t t;
    for (int md = 0; md < 2; md++)
      for (int rg = 0; rg < 16; rg++) begin
        int unsigned n;
        n = 0;
        for (int unsigned cost = 0; cost <= 24; cost++)
          for (int m = 0; m < 256; m++)
            if (n < PLEN && mask_cost(8'(m), 4'(rg)) == cost) begin
              t[(md * 16 + rg) * PLEN + n] = 8'(m);
              n++;
            end
      end
    return t;
  endfunction

  localparam rom_t ROM = build_path();

  assign data0 = ROM[addr0];
  assign data1 = ROM[addr1];
endmodule
