// Operand isolation of the controlled additions.
//
// Drives a complete multiplier with random samples and coefficients biased
// towards repeated nibbles. Whenever a layer-2 or layer-3 sum is taken as a
// shifted copy, the adder it replaces must see zero on both operands, so
// that it does not switch; whenever the sum is added, the operands must be
// the multiplexer outputs or nibble sums. Each case must occur.
module tb_operand_isolation;
  import vhbcse_pkg::*;

  sample_t    xin;
  coef_t      h;
  prod_t      y;
  logic [3:0] shared;
  int checks = 0, failures = 0;
  int n_iso[4] = '{0, 0, 0, 0};
  int n_add[4] = '{0, 0, 0, 0};

  vhbcse_cm dut (.xin(xin), .h(h), .y(y), .shared(shared));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a, b: operands seen by an adder; ea, eb: its inputs before isolation
  task automatic check_adder(input int idx, input logic iso, input pp_t a, input pp_t b,
                             input pp_t ea, input pp_t eb);
    checks++;
    if (iso) begin
      n_iso[idx]++;
      if (a != '0 || b != '0) begin
        failures++;
        $display("FAIL adder %0d not isolated: h=%h", idx, h);
      end
    end else begin
      n_add[idx]++;
      if (a != ea || b != eb) begin
        failures++;
        $display("FAIL adder %0d operands wrong: h=%h", idx, h);
      end
    end
  endtask

  initial begin
    int unsigned nib[4];
    repeat (5000) begin
      for (int n = 0; n < 4; n++) nib[n] = (($urandom % 2) != 0) ? ($urandom % 3) : ($urandom % 16);
      h   = coef_t'((($urandom % 2) << 16) | (nib[3] << 12) | (nib[2] << 8) | (nib[1] << 4) | nib[0]);
      xin = sample_t'($urandom);
      #1;
      check_adder(2, shared[2], dut.u_l2.a2, dut.u_l2.b2, dut.m[6], dut.m[5]);
      check_adder(1, shared[1], dut.u_l2.a1, dut.u_l2.b1, dut.m[4], dut.m[3]);
      check_adder(0, shared[0], dut.u_l2.a0, dut.u_l2.b0, dut.m[2], dut.m[1]);
      check_adder(3, shared[3], dut.u_l3.a,  dut.u_l3.b,  dut.q[1], dut.q[0]);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_iso[i] == 0 || n_add[i] == 0) begin
        failures++;
        $display("FAIL adder %0d: isolated %0d times, used %0d times", i, n_iso[i], n_add[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
