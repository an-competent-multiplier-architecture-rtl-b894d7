// Testbench of cl_gen: the seven control signals are compared with nibble
// and byte equalities of the coefficient; random coefficients are biased
// towards repeated nibbles so that every signal is seen high and low.
module tb_cl_gen;
  import vhbcse_pkg::*;

  coef_mag_t hm;
  ctrl_t     c;
  int checks = 0, failures = 0;
  int high[7] = '{default: 0};

  cl_gen dut (.hm(hm), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int unsigned v);
    int unsigned n3, n2, n1, n0;
    logic [6:0] e;
    hm = coef_mag_t'(v);
    #1;
    n3 = (v >> 12) & 15; n2 = (v >> 8) & 15; n1 = (v >> 4) & 15; n0 = v & 15;
    e[0] = (n3 == n2); e[1] = (n3 == n1); e[2] = (n2 == n1);
    e[3] = (n3 == n0); e[4] = (n2 == n0); e[5] = (n1 == n0);
    e[6] = ((v >> 8) & 255) == (v & 255);
    for (int i = 0; i < 7; i++) if (e[i]) high[i]++;
    checks++;
    if (c != e) begin
      failures++;
      $display("FAIL hm=%h c=%b exp=%b", hm, c, e);
    end
  endtask

  initial begin
    int unsigned nib[4], v;
    repeat (3000) begin
      // pick nibbles from a small set so that equal nibbles are common
      for (int n = 0; n < 4; n++) nib[n] = (($urandom % 2) != 0) ? ($urandom % 3) : ($urandom % 16);
      v = (nib[3] << 12) | (nib[2] << 8) | (nib[1] << 4) | nib[0];
      check_one(v);
    end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (high[i] == 0 || high[i] == 3000) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
