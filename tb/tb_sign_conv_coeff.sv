// Testbench of sign_conv_coeff: for random and corner coefficients the
// magnitude must be H for H >= 0 and |H| - 1 for H < 0, and neg the sign.
module tb_sign_conv_coeff;
  import vhbcse_pkg::*;

  coef_t     h;
  coef_mag_t hm;
  logic      neg;
  int checks = 0, failures = 0;

  sign_conv_coeff dut (.h(h), .hm(hm), .neg(neg));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int unsigned v);
    int hs, expm;
    h = coef_t'(v);
    #1;
    hs   = h[16] ? int'(v & 32'h1FFFF) - 131072 : int'(v & 32'hFFFF);
    expm = (hs < 0) ? -hs - 1 : hs;
    checks++;
    if (int'(hm) != expm || neg != (hs < 0)) begin
      failures++;
      $display("FAIL h=%h hm=%h exp=%h neg=%b", h, hm, expm, neg);
    end
  endtask

  initial begin
    check_one(0); check_one(1); check_one(32'h0FFFF); check_one(32'h10000);
    check_one(32'h1FFFF); check_one(32'h18000);
    repeat (2000) check_one($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
