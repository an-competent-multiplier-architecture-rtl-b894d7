// Partial product generator (PPG).
//
// A single adder (A0) forms P8 = Xin + Xin/2, 17 bits wide, the partial
// product of the 2-bit pattern "11". The other seven partial products are
// wired right shifts of P8: P7..P1 = P8 >> 2, 4, ..., 14, each 2 bits
// narrower than the one above (15, 13, ..., 3 bits). Xin/2 is Xin[15:1]
// (15 bits). Every Pk is returned zero-extended to 17 bits in p[k]. All of
// this follows the document. Purely combinational.
module ppg
  import vhbcse_pkg::*;
(
  input  sample_t xin,
  output pp_set_t p      // p[8] = P8 ... p[1] = P1
);

  pp_t p8;

  // Adder A0: Xin + Xin/2.
  always_comb p8 = PW'(xin) + PW'(xin[XW-1:1]);

  for (genvar k = 1; k <= NGRP; k++) begin : g_shift
    localparam int unsigned SH = 2 * (NGRP - k);   // 0, 2, ..., 14
    localparam int unsigned WK = PW - SH;          // 17, 15, ..., 3
    logic [WK-1:0] pk;
    always_comb begin
      pk   = p8[PW-1:SH];
      p[k] = PW'(pk);
    end
  end

endmodule
