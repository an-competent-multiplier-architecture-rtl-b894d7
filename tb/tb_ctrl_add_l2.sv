// Testbench of ctrl_add_l2: random layer-1 outputs (each within its
// multiplexer's width) and random control signals. Each nibble sum must be
// the plain sum of its two inputs, or, when a control signal selects
// reuse, the prescribed shift of a more significant nibble sum. Operand
// isolation is checked separately in tb_operand_isolation.
module tb_ctrl_add_l2;
  import vhbcse_pkg::*;

  pp_set_t    m;
  ctrl_t      c;
  nib_set_t   q;
  logic [2:0] shared;
  int checks = 0, failures = 0;
  int reused[3] = '{0, 0, 0};

  ctrl_add_l2 dut (.m(m), .c(c), .q(q), .shared(shared));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int unsigned mv[9], e[4];
    logic [6:0] cv;
    for (int k = 1; k <= 8; k++) begin
      // largest value multiplexer k can give: (65535 + 32767) >> 2*(8-k)
      mv[k] = $urandom % ((98302 >> (2 * (8 - k))) + 1);
      m[k]  = pp_t'(mv[k]);
    end
    cv = 7'($urandom) & 7'($urandom);   // about one in four high
    c  = cv;
    #1;
    e[3] = mv[8] + mv[7];
    e[2] = cv[0] ? e[3] >> 4 : mv[6] + mv[5];
    e[1] = cv[1] ? e[3] >> 8 : (cv[2] ? e[2] >> 4 : mv[4] + mv[3]);
    e[0] = cv[3] ? e[3] >> 12 : (cv[4] ? e[2] >> 8 : (cv[5] ? e[1] >> 4 : mv[2] + mv[1]));
    for (int n = 0; n < 4; n++) begin
      checks++;
      if (int'(q[n]) != e[n]) begin
        failures++;
        $display("FAIL c=%b Q%0d=%0d exp=%0d", cv, n, q[n], e[n]);
      end
    end
    checks++;
    if (shared != {cv[0], cv[1] | cv[2], cv[3] | cv[4] | cv[5]}) begin
      failures++;
      $display("FAIL c=%b shared=%b", cv, shared);
    end
    if (cv[0]) reused[2]++;
    if (cv[1] | cv[2]) reused[1]++;
    if (cv[3] | cv[4] | cv[5]) reused[0]++;
  endtask

  initial begin
    repeat (3000) check_one();
    for (int n = 0; n < 3; n++) begin
      checks++;
      if (reused[n] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
