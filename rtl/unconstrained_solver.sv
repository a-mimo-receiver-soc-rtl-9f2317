// unconstrained_solver: first part of the sphere decoder. It computes the
// unconstrained symbol estimate s' = H^-1 y, the centre of the search,
// from the 4x4 flat channel matrix H and the equalizer output vector y.
//
// How it works: Gauss-Jordan elimination on the augmented matrix [H | y]
// in 32-bit fixed point with 16 fractional bits, one column at a time:
//   PIVOT  inv = conj(p) / |p|^2 for the diagonal element p (two dividers),
//   NORM   the pivot row is multiplied by inv (five complex multipliers),
//   ELIM   each other row r loses A[r][c] times the pivot row, one row per
//          cycle.
// After four columns the last column holds s'. No row exchange is made:
// the equalizers leave H close to diagonal, so the diagonal pivots are
// large. A zero pivot sets `singular` and yields s' = 0.
// The receiver's block also decomposes H (QR); this implementation forms
// the search cost from H directly, so no decomposition is produced here.
//
// Interface and timing: `start` latches h and y; `done` pulses when s_est
// is valid, 4 * 5 + 1 cycles later. Inputs and outputs use SYM_FRAC
// fractional bits.
module unconstrained_solver
  import mimo_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  sym_t h [NTX][NTX],
  input  sym_t y [NTX],
  output sym_t s_est [NTX],
  output logic done,
  output logic busy,
  output logic singular
);
  localparam int unsigned FI = 16;               // internal fraction bits
  localparam int unsigned SH = FI - SYM_FRAC;

  typedef enum logic [1:0] {IDLE, PIVOT, NORM, ELIM} state_e;
  state_e st;

  logic signed [31:0] a_re [NTX][NTX+1];
  logic signed [31:0] a_im [NTX][NTX+1];
  logic signed [31:0] inv_r, inv_i;
  logic [1:0]         col, row;

  function automatic logic signed [31:0] fx_mul(input logic signed [31:0] a,
                                                input logic signed [31:0] b);
    logic signed [63:0] p;
    p = (64'(a) * 64'(b)) >>> FI;
    return p[31:0];
  endfunction

  function automatic logic signed [SYM_W-1:0] to_sym(input logic signed [31:0] v);
    logic signed [31:0] r;
    r = (v + 32'sd512) >>> SH;
    if (r > 32'sd32767)       return 16'sd32767;
    else if (r < -32'sd32768) return -16'sd32768;
    else                      return r[SYM_W-1:0];
  endfunction

  // pivot reciprocal
  logic signed [63:0] den, num_r, num_i, q_r, q_i;
  always_comb begin
    den   = 64'(a_re[col][col]) * 64'(a_re[col][col]) + 64'(a_im[col][col]) * 64'(a_im[col][col]);
    num_r = 64'(a_re[col][col]) <<< (2 * FI);
    num_i = -(64'(a_im[col][col]) <<< (2 * FI));
    q_r   = (den == 0) ? 64'sd0 : num_r / den;
    q_i   = (den == 0) ? 64'sd0 : num_i / den;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE;
      for (int r = 0; r < NTX; r++)
        for (int c = 0; c <= NTX; c++) begin
          a_re[r][c] <= '0;
          a_im[r][c] <= '0;
        end
      inv_r <= '0; inv_i <= '0;
      col <= '0; row <= '0;
      done <= 1'b0; singular <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          for (int r = 0; r < NTX; r++) begin
            for (int c = 0; c < NTX; c++) begin
              a_re[r][c] <= 32'(h[r][c].re) <<< SH;
              a_im[r][c] <= 32'(h[r][c].im) <<< SH;
            end
            a_re[r][NTX] <= 32'(y[r].re) <<< SH;
            a_im[r][NTX] <= 32'(y[r].im) <<< SH;
          end
          col <= '0;
          singular <= 1'b0;
          st <= PIVOT;
        end
        PIVOT: begin
          if (den == 0) singular <= 1'b1;
          inv_r <= q_r[31:0];
          inv_i <= q_i[31:0];
          st <= NORM;
        end
        NORM: begin
          for (int c = 0; c <= NTX; c++) begin
            a_re[col][c] <= fx_mul(a_re[col][c], inv_r) - fx_mul(a_im[col][c], inv_i);
            a_im[col][c] <= fx_mul(a_re[col][c], inv_i) + fx_mul(a_im[col][c], inv_r);
          end
          row <= (col == 2'd0) ? 2'd1 : 2'd0;
          st <= ELIM;
        end
        ELIM: begin
          for (int c = 0; c <= NTX; c++) begin
            a_re[row][c] <= a_re[row][c] - (fx_mul(a_re[row][col], a_re[col][c]) - fx_mul(a_im[row][col], a_im[col][c]));
            a_im[row][c] <= a_im[row][c] - (fx_mul(a_re[row][col], a_im[col][c]) + fx_mul(a_im[row][col], a_re[col][c]));
          end
          if (row == 2'd3 || (row == 2'd2 && col == 2'd3)) begin
            if (col == 2'd3) begin
              st   <= IDLE;
              done <= 1'b1;
            end else begin
              col <= col + 1'b1;
              st  <= PIVOT;
            end
          end else begin
            row <= (row + 2'd1 == col) ? row + 2'd2 : row + 2'd1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy = (st != IDLE);
  always_comb
    for (int r = 0; r < NTX; r++) begin
      s_est[r].re = singular ? '0 : to_sym(a_re[r][NTX]);
      s_est[r].im = singular ? '0 : to_sym(a_im[r][NTX]);
    end
endmodule
