// Layer-4 final addition.
//
// Adds the two byte sums of layer 3. The partial products count in half
// output LSBs, so the 17-bit sum is shifted right by one to give the
// 16-bit magnitude of the product. The sum of the largest possible byte
// sums stays below 2^17, so no carry is lost. A plain adder is used, as the
// document leaves the adder type open. Combinational. Bit 0 of the sum,
// the half LSB, is dropped on purpose and stays unused.
module final_add_l4
  import vhbcse_pkg::*;
(
  input  pp_t  u,
  input  pp_t  l,
  output mag_t r
);

  pp_t s;

  always_comb begin
    s = u + l;
    r = s[PW-1:1];
  end

endmodule
