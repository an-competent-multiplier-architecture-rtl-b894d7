// Coefficient sign conversion.
//
// Turns the 17-bit two's complement coefficient H[16:0] into the 16-bit
// magnitude Hm[15:0] used by the rest of the multiplier: a 1's complementer
// inverts H[15:0] and a 2:1 multiplexer, steered by the sign bit H[16],
// picks the inverted bits for a negative coefficient and H[15:0] otherwise.
// For a negative H this gives Hm = |H| - 1; the result sign conversion
// applies the matching 1's complement, which keeps the product within one
// LSB. The structure follows the document; the sign is also brought out as
// neg for that later stage. Purely combinational.
module sign_conv_coeff
  import vhbcse_pkg::*;
(
  input  coef_t     h,    // coefficient, two's complement
  output coef_mag_t hm,   // multiplexed coefficient Hm[15:0]
  output logic      neg   // H[16]
);

  coef_mag_t h_inv;

  always_comb begin
    h_inv = ~h[HMW-1:0];               // 1's complementer
    hm    = h[HW-1] ? h_inv : h[HMW-1:0];  // 2:1 multiplexer
    neg   = h[HW-1];
  end

endmodule
