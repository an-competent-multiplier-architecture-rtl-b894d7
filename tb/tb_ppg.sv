// Testbench of ppg: P8 must be x + floor(x/2) and Pk must equal P8 shifted
// right by 2*(8-k) and fit in 2k+1 bits.
module tb_ppg;
  import vhbcse_pkg::*;

  sample_t xin;
  pp_set_t p;
  int checks = 0, failures = 0;

  ppg dut (.xin(xin), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int unsigned v);
    int unsigned p8, e;
    xin = sample_t'(v);
    #1;
    p8 = int'(xin) + int'(xin) / 2;
    for (int k = 1; k <= 8; k++) begin
      e = p8 / (1 << (2 * (8 - k)));
      checks++;
      if (int'(p[k]) != e || (int'(p[k]) >> (2 * k + 1)) != 0) begin
        failures++;
        $display("FAIL x=%0d P%0d=%0d exp=%0d", xin, k, p[k], e);
      end
    end
  endtask

  initial begin
    check_one(0); check_one(1); check_one(65535); check_one(43690); check_one(21845);
    repeat (2000) check_one($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
