// interleaver_rom: read-only table of the turbo interleaver permutation.
// Entry i holds pi(i) = (F1*i + F2*i^2) mod K, a quadratic permutation
// polynomial; with K = 128, F1 = 15, F2 = 32 it is a permutation (the
// parameters of the LTE interleaver for that length). The table is
// computed at elaboration. Two combinational read ports serve the read
// (branch metric) and write (extrinsic) sides of the decoder.
// The description names an interleaver ROM; the permutation is this
// implementation's choice.
module interleaver_rom #(
  parameter int unsigned K  = 128,
  parameter int unsigned F1 = 15,
  parameter int unsigned F2 = 32,
  localparam int unsigned AW = $clog2(K)
) (
  input  logic [AW-1:0] addr0,
  input  logic [AW-1:0] addr1,
  output logic [AW-1:0] data0,
  output logic [AW-1:0] data1
);
  typedef logic [AW-1:0] rom_t [K];

  function automatic rom_t build();
    rom_t t;
    for (int i = 0; i < K; i++)
      t[i] = AW'((longint'(F1) * i + longint'(F2) * i * i) % K);
    return t;
  endfunction

  localparam rom_t ROM = build();

  assign data0 = ROM[addr0];
  assign data1 = ROM[addr1];
endmodule
