// Layer-1 multiplexer unit (2-bit vertical BCSE).
//
// Hm is cut into eight 2-bit groups; group k (k = 8 for Hm[15:14] down to
// k = 1 for Hm[1:0]) drives a 4:1 multiplexer of width 2k+1 (17, 15, ...,
// 3 bits). Group k sits 2*(8-k) bit positions below the top group, so each
// choice is shifted right by that amount:
//   "00" -> 0, "01" -> Xin/2, "10" -> Xin, "11" -> P8 (= Pk from the PPG).
// Only "11" needs the adder of the PPG; the others are wiring. Bits shifted
// out are dropped, which is what keeps the lower multiplexers narrow.
// Output m[k] is zero-extended to 17 bits and counts in half output LSBs.
// Widths and the single-adder rule follow the document; the assignment of
// "01"/"10" to Xin/2 and Xin follows from the bit weights. Combinational.
module mux_unit_l1
  import vhbcse_pkg::*;
(
  input  coef_mag_t hm,
  input  sample_t   xin,
  input  pp_set_t   p,    // from the PPG, p[k] = P8 >> 2*(8-k)
  output pp_set_t   m     // m[k] belongs to Hm[2k-1:2k-2]
);

  for (genvar k = 1; k <= NGRP; k++) begin : g_mux
    localparam int unsigned SH = 2 * (NGRP - k);
    localparam int unsigned WK = PW - SH;
    logic [1:0]    grp;
    logic [WK-1:0] sel;
    always_comb begin
      grp = hm[2*k-1 -: 2];
      unique case (grp)
        2'b00: sel = '0;
        2'b01: sel = WK'(xin >> (SH + 1));   // Xin/2
        2'b10: sel = WK'(xin >> SH);         // Xin
        2'b11: sel = p[k][WK-1:0];           // Xin + Xin/2
      endcase
      m[k] = PW'(sel);
    end
  end

endmodule
