// Testbench of sign_conv_result: y must be r for a positive coefficient and
// -r - 1 for a negative one, as a 17-bit two's complement value.
module tb_sign_conv_result;
  import vhbcse_pkg::*;

  mag_t  r;
  logic  neg;
  prod_t y;
  int checks = 0, failures = 0;

  sign_conv_result dut (.r(r), .neg(neg), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int unsigned rv, input logic nv);
    int e;
    r = mag_t'(rv);
    neg = nv;
    #1;
    e = nv ? -int'(r) - 1 : int'(r);
    checks++;
    if (int'($signed(y)) != e) begin
      failures++;
      $display("FAIL r=%0d neg=%b y=%0d exp=%0d", r, neg, $signed(y), e);
    end
  endtask

  initial begin
    check_one(0, 0); check_one(0, 1); check_one(65535, 0); check_one(65535, 1);
    repeat (3000) check_one($urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
