// tx_model: behavioural transmitter for testbenches. For each of the four
// transmit antennas it spreads a given symbol level with Walsh code
// `user_code` (length 16), adds the antenna's pilot (all-ones code, sign
// from row k of a 4x4 Hadamard matrix, symbol index mod 4) and multiplies
// by the antenna's +-1 +-j scrambling chip from a 15-bit LFSR
// (x^15 + x^14 + 1, seeds as in the receiver). The chip amplitude unit is
// CU. `next_chip` returns the four transmitted chips of chip n and moves
// the scramblers on; chips must be requested in order.
module tx_model #(
  parameter int CU = 8
) ();
  logic [14:0] lfsr [4];
  localparam logic [14:0] SEEDS [4] = '{15'h0001, 15'h1234, 15'h2A5B, 15'h4F0D};

  task automatic reset_codes();
    for (int k = 0; k < 4; k++) lfsr[k] = SEEDS[k];
  endtask

  task automatic next_chip(input int n, input int user_code, input int lv_re [4], input int lv_im [4],
                           output int x_re [4], output int x_im [4]);
    int ci, m;
    ci = n % 16; m = (n / 16) % 4;
    for (int k = 0; k < 4; k++) begin
      int w, p, dr, di, sr, si;
      w  = ($countones(user_code & ci) % 2) ? -1 : 1;
      p  = ($countones(k & m) % 2) ? -1 : 1;
      dr = lv_re[k] * w + p;
      di = lv_im[k] * w;
      sr = lfsr[k][14] ? -1 : 1;
      si = lfsr[k][7] ? -1 : 1;
      x_re[k] = CU * (dr * sr - di * si);
      x_im[k] = CU * (dr * si + di * sr);
      lfsr[k] = {lfsr[k][13:0], lfsr[k][14] ^ lfsr[k][13]};
    end
  endtask
endmodule
