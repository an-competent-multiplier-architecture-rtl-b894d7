// Shared widths and types of the VHBCSE constant multiplier.
//
// The multiplier takes a 16-bit unsigned sample and a 17-bit two's
// complement coefficient. The coefficient is handled as a 16-bit magnitude
// Hm split into eight 2-bit groups (vertical step) and four 4-bit nibbles
// and two bytes (horizontal steps). Partial products are 17 bits wide and
// count in units of half an output LSB; the product is 17 bits, two's
// complement. The 16/17/16-bit sizes follow the document; the half-LSB
// unit and the 17-bit signed output are this design's reading of it.
package vhbcse_pkg;

  parameter int unsigned XW   = 16;        // input sample width
  parameter int unsigned HW   = 17;        // coefficient width, sign included
  parameter int unsigned HMW  = HW - 1;    // coefficient magnitude width
  parameter int unsigned PW   = 17;        // widest partial product (P8)
  parameter int unsigned RW   = 16;        // magnitude of the product
  parameter int unsigned YW   = RW + 1;    // signed product
  parameter int unsigned NGRP = HMW / 2;   // 2-bit groups at layer 1
  parameter int unsigned NNIB = HMW / 4;   // 4-bit nibbles at layer 2

  typedef logic [XW-1:0]  sample_t;
  typedef logic [HW-1:0]  coef_t;
  typedef logic [HMW-1:0] coef_mag_t;
  typedef logic [PW-1:0]  pp_t;
  typedef logic [RW-1:0]  mag_t;
  typedef logic [YW-1:0]  prod_t;

  // Eight partial products or layer-1 outputs, index k = 8..1 as P8..P1.
  typedef pp_t [NGRP:1]   pp_set_t;
  // Four nibble sums, index 3 belongs to Hm[15:12].
  typedef pp_t [NNIB-1:0] nib_set_t;

  // Control signals of the control logic generator, bit n-1 is Cn.
  typedef struct packed {
    logic c7;  // Hm[15:8]  == Hm[7:0]
    logic c6;  // Hm[7:4]   == Hm[3:0]
    logic c5;  // Hm[11:8]  == Hm[3:0]
    logic c4;  // Hm[15:12] == Hm[3:0]
    logic c3;  // Hm[11:8]  == Hm[7:4]
    logic c2;  // Hm[15:12] == Hm[7:4]
    logic c1;  // Hm[15:12] == Hm[11:8]
  } ctrl_t;

endpackage
