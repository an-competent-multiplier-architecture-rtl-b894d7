// Testbench of ctrl_add_l3: the upper byte sum must be Q3 + Q2; the lower
// one Q1 + Q0, or U >> 8 when c7 is high.
module tb_ctrl_add_l3;
  import vhbcse_pkg::*;

  nib_set_t q;
  logic     c7;
  pp_t      u, l;
  logic     shared;
  int checks = 0, failures = 0;
  int reused = 0;

  ctrl_add_l3 dut (.q(q), .c7(c7), .u(u), .l(l), .shared(shared));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned qv[4], eu, el;
    repeat (3000) begin
      qv[3] = $urandom % (1 << 16);
      qv[2] = $urandom % (1 << 13);
      qv[1] = $urandom % (1 << 9);
      qv[0] = $urandom % (1 << 5);
      for (int n = 0; n < 4; n++) q[n] = pp_t'(qv[n]);
      c7 = ($urandom % 3) == 0;
      #1;
      eu = qv[3] + qv[2];
      el = c7 ? eu >> 8 : qv[1] + qv[0];
      checks++;
      if (int'(u) != eu || int'(l) != el || shared != c7) begin
        failures++;
        $display("FAIL c7=%b u=%0d/%0d l=%0d/%0d", c7, u, eu, l, el);
      end
      if (c7) reused++;
    end
    checks++;
    if (reused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
