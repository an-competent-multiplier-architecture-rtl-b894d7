// Testbench of vhbcse_cm, the complete multiplier.
//
// Each product is checked twice: bit for bit against the integer model of
// the truncated shift-and-add algorithm, and against the exact value
// x*h/2^16, from which it may differ by less than 5 LSB. Coefficients are
// drawn so that every kind of reuse (layer-2 Q2, Q1, Q0 and layer-3 byte)
// and both signs occur; each must have happened at least once.
module tb_vhbcse_cm;
  import vhbcse_pkg::*;
  import vhbcse_ref_pkg::*;

  sample_t    xin;
  coef_t      h;
  prod_t      y;
  logic [3:0] shared;
  int checks = 0, failures = 0;
  int n_shared[4] = '{0, 0, 0, 0};
  int n_neg = 0, n_pos = 0;
  real max_err = 0.0;

  vhbcse_cm dut (.xin(xin), .h(h), .y(y), .shared(shared));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int unsigned xv, input int unsigned hv);
    int e;
    real err;
    xin = sample_t'(xv);
    h   = coef_t'(hv);
    #1;
    e   = ref_y(int'(xin), int'(h));
    err = exact_err(int'($signed(y)), int'(xin), int'(h));
    if (err < 0) err = -err;
    if (err > max_err) max_err = err;
    checks += 2;
    if (int'($signed(y)) != e) begin
      failures++;
      $display("FAIL x=%0d h=%h y=%0d model=%0d", xin, h, $signed(y), e);
    end
    if (err >= 5.0) begin
      failures++;
      $display("FAIL x=%0d h=%h y=%0d error %f LSB", xin, h, $signed(y), err);
    end
    for (int i = 0; i < 4; i++) if (shared[i]) n_shared[i]++;
    if (h[16]) n_neg++; else n_pos++;
  endtask

  function automatic int unsigned biased_coef();
    int unsigned nib[4];
    for (int n = 0; n < 4; n++) nib[n] = (($urandom % 2) != 0) ? ($urandom % 3) : ($urandom % 16);
    return (($urandom % 2) << 16) | (nib[3] << 12) | (nib[2] << 8) | (nib[1] << 4) | nib[0];
  endfunction

  initial begin
    // corners: zero, largest magnitudes, both extremes of the coefficient
    check_one(0, 0);         check_one(65535, 0);
    check_one(65535, 32'h0FFFF); check_one(65535, 32'h10000);
    check_one(65535, 32'h1FFFF); check_one(65535, 32'h08000);
    check_one(12345, 32'h01111); check_one(54321, 32'h1ABAB);
    repeat (5000) check_one($urandom, $urandom);
    repeat (5000) check_one($urandom, biased_coef());
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_shared[i] == 0) begin
        failures++;
        $display("FAIL reuse kind %0d never happened", i);
      end
    end
    checks++;
    if (n_neg == 0 || n_pos == 0) failures++;
    $display("reuse counts Q0=%0d Q1=%0d Q2=%0d L=%0d, max error %f LSB",
             n_shared[0], n_shared[1], n_shared[2], n_shared[3], max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
