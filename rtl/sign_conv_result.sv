// Sign conversion of the final result.
//
// Gives the product its sign back: {0, R} as it is for a positive
// coefficient and its 1's complement for a negative one, steered by the
// coefficient's sign bit H[16]. Since the coefficient conversion used
// Hm = |H| - 1, the 1's complement -R - 1 lands within one LSB of
// -Xin*|H|/2^16. The document names this stage and its H[MSB] input; the
// 1's complement and the 17-bit two's complement output are this design's
// reading. Combinational.
module sign_conv_result
  import vhbcse_pkg::*;
(
  input  mag_t  r,
  input  logic  neg,
  output prod_t y
);

  prod_t pos;

  always_comb begin
    pos = {1'b0, r};
    y   = neg ? ~pos : pos;
  end

endmodule
