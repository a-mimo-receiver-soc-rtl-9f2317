// nlms_error: NLMS error calculation of an equalizer. The output
// correlator result z is compared with the expected pilot amplitude A
// (a real number): e = A - z. The pilot correlation of a perfectly
// equalized output is real and equal to A, so e is zero at convergence.
//
// Interface and timing: registered; `e_valid` follows `z_valid` by one
// cycle. A is an input so that it can track the correlation period.
module nlms_error
  import mimo_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    z_valid,
  input  acc_t                    z,
  input  logic signed [ACC_W-1:0] amp,
  output acc_t                    e,
  output logic                    e_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e       <= '0;
      e_valid <= 1'b0;
    end else begin
      e_valid <= z_valid;
      if (z_valid) begin
        e.re <= amp - z.re;
        e.im <= -z.im;
      end
    end
  end
endmodule
