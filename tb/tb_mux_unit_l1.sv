// Testbench of mux_unit_l1: every multiplexer output is compared with the
// value of its 2-bit group times x/2, shifted to the group's place and
// truncated (00: 0, 01: x/2, 10: x, 11: x + x/2). The partial products
// are driven from the testbench's own arithmetic.
module tb_mux_unit_l1;
  import vhbcse_pkg::*;

  coef_mag_t hm;
  sample_t   xin;
  pp_set_t   p, m;
  int checks = 0, failures = 0;
  int seen[4] = '{0, 0, 0, 0};

  mux_unit_l1 dut (.hm(hm), .xin(xin), .p(p), .m(m));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int unsigned hv, input int unsigned xv);
    int unsigned x, g, sh, e, p8;
    hm = coef_mag_t'(hv);
    xin = sample_t'(xv);
    x = int'(xin);
    p8 = x + x / 2;
    for (int k = 1; k <= 8; k++) p[k] = pp_t'(p8 >> (2 * (8 - k)));
    #1;
    for (int k = 1; k <= 8; k++) begin
      sh = 2 * (8 - k);
      g  = (int'(hm) >> (2 * k - 2)) & 3;
      seen[g]++;
      case (g)
        0: e = 0;
        1: e = (x / 2) >> sh;
        2: e = x >> sh;
        default: e = p8 >> sh;
      endcase
      checks++;
      if (int'(m[k]) != e) begin
        failures++;
        $display("FAIL hm=%h x=%0d k=%0d m=%0d exp=%0d", hm, x, k, m[k], e);
      end
    end
  endtask

  initial begin
    check_one(32'h0000, 65535); check_one(32'hFFFF, 65535);
    check_one(32'h5555, 12345); check_one(32'hAAAA, 54321);
    repeat (2000) check_one($urandom, $urandom);
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (seen[g] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
