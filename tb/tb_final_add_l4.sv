// Testbench of final_add_l4: the magnitude must be floor((u + l) / 2) for
// byte sums in the range the earlier layers can produce.
module tb_final_add_l4;
  import vhbcse_pkg::*;

  pp_t  u, l;
  mag_t r;
  int checks = 0, failures = 0;

  final_add_l4 dut (.u(u), .l(l), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int unsigned uv, input int unsigned lv);
    u = pp_t'(uv);
    l = pp_t'(lv);
    #1;
    checks++;
    if (int'(r) != (uv + lv) / 2) begin
      failures++;
      $display("FAIL u=%0d l=%0d r=%0d", uv, lv, r);
    end
  endtask

  initial begin
    check_one(0, 0); check_one(130556, 509); check_one(1, 0); check_one(1, 1);
    repeat (3000) check_one($urandom % 130557, $urandom % 510);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
