// Reference models for the VHBCSE multiplier testbenches.
//
// ref_mag() computes, with plain integer arithmetic, the truncated
// shift-and-add product that the multiplier is specified to produce from a
// 16-bit sample and a 16-bit coefficient magnitude, including the reuse of
// shifted sums for equal nibbles and equal bytes. ref_y() adds the sign
// handling. exact_err() gives the distance of a product from the exact
// value x*h/2^16, which the testbenches bound independently of the model.
package vhbcse_ref_pkg;

  function automatic int unsigned ref_term(int unsigned x, int unsigned hm, int k);
    int unsigned sh, g;
    sh = 2 * (8 - k);
    g  = (hm >> (2 * k - 2)) & 3;
    case (g)
      0: return 0;
      1: return (x / 2) >> sh;
      2: return x >> sh;
      default: return (x + x / 2) >> sh;
    endcase
  endfunction

  // Nibble sums after the layer-2 reuse rules; q[n] belongs to hm[4n+3:4n].
  function automatic void ref_nibbles(int unsigned x, int unsigned hm, output int unsigned q[4]);
    int unsigned nib[4], raw[4];
    for (int n = 0; n < 4; n++) begin
      nib[n] = (hm >> (4 * n)) & 15;
      raw[n] = ref_term(x, hm, 2 * n + 2) + ref_term(x, hm, 2 * n + 1);
    end
    q[3] = raw[3];
    q[2] = (nib[3] == nib[2]) ? q[3] / 16 : raw[2];
    if (nib[3] == nib[1])      q[1] = q[3] / 256;
    else if (nib[2] == nib[1]) q[1] = q[2] / 16;
    else                       q[1] = raw[1];
    if (nib[3] == nib[0])      q[0] = q[3] / 4096;
    else if (nib[2] == nib[0]) q[0] = q[2] / 256;
    else if (nib[1] == nib[0]) q[0] = q[1] / 16;
    else                       q[0] = raw[0];
  endfunction

  function automatic int unsigned ref_mag(int unsigned x, int unsigned hm);
    int unsigned q[4], u, l;
    ref_nibbles(x, hm, q);
    u = q[3] + q[2];
    l = ((hm >> 8) == (hm & 255)) ? u / 256 : q[1] + q[0];
    return (u + l) / 2;
  endfunction

  // Signed product for a 17-bit two's complement coefficient h.
  function automatic int ref_y(int unsigned x, int unsigned h);
    int unsigned hm;
    if (h[16]) begin
      hm = (~h) & 32'hFFFF;
      return -int'(ref_mag(x, hm)) - 1;
    end
    return int'(ref_mag(x, h & 32'hFFFF));
  endfunction

  function automatic int coef_value(int unsigned h);
    return h[16] ? int'(h) - 131072 : int'(h);
  endfunction

  // y minus the exact product x*h/2^16.
  function automatic real exact_err(int y, int unsigned x, int unsigned h);
    return real'(y) - real'(longint'(x) * longint'(coef_value(h))) / 65536.0;
  endfunction

endpackage
