// Layer-3 controlled addition (8-bit horizontal BCSE).
//
// Adds the nibble sums into byte sums: U = Q3 + Q2 for Hm[15:8] and
// L = Q1 + Q0 for Hm[7:0]. When C7 says the two bytes of Hm are equal, L is
// taken as U >> 8 and the lower adder's operands are forced to zero. The
// byte-level reuse follows the document; the isolation by AND gating is
// this design's choice. shared reports the reuse. Combinational.
module ctrl_add_l3
  import vhbcse_pkg::*;
(
  input  nib_set_t q,
  input  logic     c7,
  output pp_t      u,
  output pp_t      l,
  output logic     shared
);

  pp_t a, b, s;

  always_comb begin
    shared = c7;
    u = q[3] + q[2];
    a = q[1] & {PW{~c7}};
    b = q[0] & {PW{~c7}};
    s = a + b;
    l = c7 ? (u >> 8) : s;
  end

endmodule
