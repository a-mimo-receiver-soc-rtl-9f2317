// correlation_storage: holds the NRX x TAPS input-correlator results of the
// last completed correlation period, so the coefficient update can read
// them one at a time while the correlator already accumulates the next
// period.
//
// Interface and timing: the whole set is written in one cycle when `wr` is
// high. `rd_addr` selects entry m*TAPS + k; `rd_data` follows it
// combinationally. The description names the block; its organisation as a
// register array with one read port is this implementation's choice.
module correlation_storage
  import mimo_pkg::*;
#(
  parameter int unsigned TAPS = NTAPS,
  localparam int unsigned N   = NRX * TAPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr,
  input  acc_t                 wr_data [NRX][TAPS],
  input  logic [$clog2(N)-1:0] rd_addr,
  output acc_t                 rd_data
);
  acc_t store [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) store[i] <= '0;
    end else if (wr) begin
      for (int m = 0; m < NRX; m++)
        for (int k = 0; k < TAPS; k++) store[m*TAPS + k] <= wr_data[m][k];
    end
  end

  assign rd_data = store[rd_addr];
endmodule
