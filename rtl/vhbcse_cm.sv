// VHBCSE constant multiplier: y ~ xin * h / 2^16.
//
// Multiplies a 16-bit unsigned sample by a 17-bit two's complement
// coefficient, taken as a fraction in [-1, 1), with shift-and-add logic
// that shares common binary sub-expressions of the coefficient:
//   1. sign_conv_coeff  makes the 16-bit magnitude Hm of H;
//   2. ppg              forms Xin + Xin/2 with one adder and its shifts;
//   3. mux_unit_l1      picks one partial product per 2-bit group of Hm
//                       (vertical 2-bit BCSE);
//   4. cl_gen           finds equal nibbles and equal bytes of Hm;
//   5. ctrl_add_l2/l3   sum per nibble and per byte, reusing a shifted sum
//                       where the coefficient repeats itself (horizontal
//                       4-bit and 8-bit BCSE);
//   6. final_add_l4     adds the two byte sums;
//   7. sign_conv_result restores the sign.
// Dropped low bits make the result a truncated product: it stays within
// 5 LSB of xin*h/2^16. Block order and widths follow the document's data
// flow; the handling of signs and scaling is this design's reading of it.
// Purely combinational; the sharing flags are brought out for observation.
module vhbcse_cm
  import vhbcse_pkg::*;
(
  input  sample_t    xin,
  input  coef_t      h,
  output prod_t      y,
  output logic [3:0] shared   // [2:0]: Q2..Q0 reused at layer 2, [3]: L reused at layer 3
);

  coef_mag_t hm;
  logic      neg;
  pp_set_t   p, m;
  ctrl_t     c;
  nib_set_t  q;
  pp_t       u, l;
  mag_t      r;

  sign_conv_coeff  u_sign_h (.h(h), .hm(hm), .neg(neg));
  ppg              u_ppg    (.xin(xin), .p(p));
  mux_unit_l1      u_mux    (.hm(hm), .xin(xin), .p(p), .m(m));
  cl_gen           u_cl     (.hm(hm), .c(c));
  ctrl_add_l2      u_l2     (.m(m), .c(c), .q(q), .shared(shared[2:0]));
  ctrl_add_l3      u_l3     (.q(q), .c7(c.c7), .u(u), .l(l), .shared(shared[3]));
  final_add_l4     u_l4     (.u(u), .l(l), .r(r));
  sign_conv_result u_sign_y (.r(r), .neg(neg), .y(y));

endmodule
