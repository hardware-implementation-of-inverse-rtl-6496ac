// Inverse integer DCT unit (4x4 core inverse transform of H.264).
//
// Computes X = Ci^T * Y * Ci for a pre-scaled coefficient block Y, as two
// 1-D stages of add/subtract structures: first the columns
//   X'(0,k) = Y0 + Y1 + Y2 + (Y3>>1)      X'(1,k) = Y0 + (Y1>>1) - Y2 - Y3
//   X'(2,k) = Y0 - (Y1>>1) - Y2 + Y3      X'(3,k) = Y0 - Y1 + Y2 - (Y3>>1)
// with Yi = Y(i,k), then the same butterflies along each row of X'.
// Halving is an arithmetic right shift (two's complement). All values are
// W bits wide (16 by default, as described); a result that does not fit
// wraps. The unit is combinational: its result is taken into the 256-bit
// register of the output memory access unit.
// Element 4*i+j of y and x is row i, column j.
module iqit_idct #(
  parameter int W = 16
) (
  input  logic [15:0][W-1:0] y,
  output logic [15:0][W-1:0] x
);

  typedef logic signed [W-1:0] s_t;

  function automatic s_t [3:0] butterfly(input s_t a0, input s_t a1, input s_t a2, input s_t a3);
    s_t [3:0] r;
    r[0] = a0 + a1 + a2 + (a3 >>> 1);
    r[1] = a0 + (a1 >>> 1) - a2 - a3;
    r[2] = a0 - (a1 >>> 1) - a2 + a3;
    r[3] = a0 - a1 + a2 - (a3 >>> 1);
    return r;
  endfunction

  s_t [15:0] xp;   // X' = Ci^T * Y

  always_comb begin
    s_t [3:0] v;
    for (int k = 0; k < 4; k++) begin
      v = butterfly(s_t'(y[k]), s_t'(y[4+k]), s_t'(y[8+k]), s_t'(y[12+k]));
      for (int i = 0; i < 4; i++) xp[4*i+k] = v[i];
    end
    for (int i = 0; i < 4; i++) begin
      v = butterfly(xp[4*i], xp[4*i+1], xp[4*i+2], xp[4*i+3]);
      for (int j = 0; j < 4; j++) x[4*i+j] = v[j];
    end
  end

endmodule
