// Layer-2 controlled addition (4-bit horizontal BCSE).
//
// Adds the two layer-1 outputs of each nibble of Hm into a nibble sum:
// Q3 = M8 + M7 (Hm[15:12]), Q2 = M6 + M5, Q1 = M4 + M3, Q0 = M2 + M1.
// Because every Mk is already shifted to its place, a nibble equal to a
// more significant one has the same sum shifted right by four bits per
// nibble of distance. The control signals pick that shifted sum instead of
// an addition:
//   Q2 = Q3 >> 4                     if C1
//   Q1 = Q3 >> 8  if C2, else Q2 >> 4 if C3
//   Q0 = Q3 >> 12 if C4, else Q2 >> 8 if C5, else Q1 >> 4 if C6
// An adder whose sum is replaced has its operands forced to zero (operand
// isolation), so it does not toggle. The reuse of shifted sums and the
// control signals follow the document; the priority among them and the
// isolation by AND gating are this design's choices. shared[n] reports
// that Qn was reused. Combinational. The whole control word is taken in
// for simplicity; C7 belongs to layer 3 and is left unused here.
module ctrl_add_l2
  import vhbcse_pkg::*;
(
  input  pp_set_t    m,
  input  ctrl_t      c,
  output nib_set_t   q,
  output logic [2:0] shared   // shared[n]: Qn reused, n = 0..2
);

  pp_t a2, b2, a1, b1, a0, b0;     // isolated adder operands
  pp_t s3, s2, s1, s0;             // adder outputs A1..A4

  always_comb begin
    shared[2] = c.c1;
    shared[1] = c.c2 | c.c3;
    shared[0] = c.c4 | c.c5 | c.c6;

    a2 = m[6] & {PW{~shared[2]}};
    b2 = m[5] & {PW{~shared[2]}};
    a1 = m[4] & {PW{~shared[1]}};
    b1 = m[3] & {PW{~shared[1]}};
    a0 = m[2] & {PW{~shared[0]}};
    b0 = m[1] & {PW{~shared[0]}};

    s3 = m[8] + m[7];
    s2 = a2 + b2;
    s1 = a1 + b1;
    s0 = a0 + b0;

    q[3] = s3;
    q[2] = c.c1 ? (q[3] >> 4) : s2;
    if (c.c2)      q[1] = q[3] >> 8;
    else if (c.c3) q[1] = q[2] >> 4;
    else           q[1] = s1;
    if (c.c4)      q[0] = q[3] >> 12;
    else if (c.c5) q[0] = q[2] >> 8;
    else if (c.c6) q[0] = q[1] >> 4;
    else           q[0] = s0;
  end

endmodule
