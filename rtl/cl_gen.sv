// Control logic (CL) generator.
//
// Compares the four nibbles of Hm pairwise with six 4-bit comparators,
// C1..C6, and derives the 8-bit equality Hm[15:8] == Hm[7:0] as
// C7 = C2 & C5 (upper nibbles of the two bytes equal and lower nibbles
// equal), without a comparator of its own. The pairs compared follow the
// document; the layers 2 and 3 use these signals to reuse a shifted sum in
// place of an addition. Combinational.
module cl_gen
  import vhbcse_pkg::*;
(
  input  coef_mag_t hm,
  output ctrl_t     c
);

  logic [3:0] n3, n2, n1, n0;
  logic c1, c2, c3, c4, c5, c6;

  assign n3 = hm[15:12];
  assign n2 = hm[11:8];
  assign n1 = hm[7:4];
  assign n0 = hm[3:0];

  comp4 u_c1 (.a(n3), .b(n2), .eq(c1));
  comp4 u_c2 (.a(n3), .b(n1), .eq(c2));
  comp4 u_c3 (.a(n2), .b(n1), .eq(c3));
  comp4 u_c4 (.a(n3), .b(n0), .eq(c4));
  comp4 u_c5 (.a(n2), .b(n0), .eq(c5));
  comp4 u_c6 (.a(n1), .b(n0), .eq(c6));

  always_comb begin
    c.c1 = c1;
    c.c2 = c2;
    c.c3 = c3;
    c.c4 = c4;
    c.c5 = c5;
    c.c6 = c6;
    c.c7 = c2 & c5;
  end

endmodule
