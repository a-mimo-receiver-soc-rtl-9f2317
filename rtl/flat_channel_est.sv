// flat_channel_est: estimates the 4x4 flat channel matrix H that links the
// transmitted symbol vector to the equalizer outputs, y = H s, from the
// equalizers' pilot symbols. The pilot of transmit path j carries the sign
// pattern p_j(m) = (-1)^parity(j & m), m = 0..3 (rows of a 4x4 Hadamard
// matrix), so over one pilot cycle of four symbols
//   H[k][j] = 1/4 * sum_m q_k(m) * p_j(m)
// where q_k(m) is the pilot symbol of equalizer k. The sums are plain
// add/subtract operations; the division by four is a rounded shift.
//
// Interface and timing: `in_valid` presents one pilot symbol vector with
// its index `pidx`; a cycle starts at pidx 0. After the symbol with pidx 3
// the new matrix appears on `h` with a one-cycle `h_valid` pulse and is
// held until the next cycle completes. The description says only that the
// block estimates the channel matrix from the equalization results; the
// pilot-correlation method is this implementation's choice.
module flat_channel_est
  import mimo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sym_t       pilot_sym [NTX],
  input  logic [1:0] pidx,
  output sym_t       h [NTX][NTX],
  output logic       h_valid
);
  logic signed [SYM_W+2:0] acc_re [NTX][NTX];
  logic signed [SYM_W+2:0] acc_im [NTX][NTX];
  logic                    armed;

  function automatic logic signed [SYM_W-1:0] quarter(input logic signed [SYM_W+2:0] v);
    logic signed [SYM_W+2:0] r;
    r = (v + 19'sd2) >>> 2;
    return r[SYM_W-1:0];
  endfunction

  // next accumulator values: restart at pilot symbol 0, add the symbol
  // with antenna j's Hadamard sign
  logic signed [SYM_W+2:0] nr [NTX][NTX];
  logic signed [SYM_W+2:0] ni [NTX][NTX];
  always_comb begin
    for (int k = 0; k < NTX; k++)
      for (int j = 0; j < NTX; j++) begin
        logic neg;
        neg = ^(2'(j) & pidx);
        nr[k][j] = ((pidx == 2'd0) ? '0 : acc_re[k][j])
                   + (neg ? -(SYM_W+3)'(pilot_sym[k].re) : (SYM_W+3)'(pilot_sym[k].re));
        ni[k][j] = ((pidx == 2'd0) ? '0 : acc_im[k][j])
                   + (neg ? -(SYM_W+3)'(pilot_sym[k].im) : (SYM_W+3)'(pilot_sym[k].im));
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTX; k++)
        for (int j = 0; j < NTX; j++) begin
          acc_re[k][j] <= '0;
          acc_im[k][j] <= '0;
          h[k][j]      <= '0;
        end
      armed   <= 1'b0;
      h_valid <= 1'b0;
    end else begin
      h_valid <= 1'b0;
      if (in_valid) begin
        if (pidx == 2'd0) armed <= 1'b1;
        for (int k = 0; k < NTX; k++)
          for (int j = 0; j < NTX; j++) begin
            acc_re[k][j] <= nr[k][j];
            acc_im[k][j] <= ni[k][j];
            if (pidx == 2'd3 && armed) begin
              h[k][j].re <= quarter(nr[k][j]);
              h[k][j].im <= quarter(ni[k][j]);
            end
          end
        if (pidx == 2'd3 && armed) h_valid <= 1'b1;
      end
    end
  end
endmodule
