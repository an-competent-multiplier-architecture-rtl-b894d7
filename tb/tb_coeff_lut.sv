// Testbench of coeff_lut: after reset every entry reads zero; random writes
// (some with we low or an address beyond the table) must update exactly the
// addressed entry, visible on the next cycle, as kept in a shadow array.
module tb_coeff_lut;
  import vhbcse_pkg::*;

  localparam int unsigned TAPS = 5;   // not a power of two: tests the address guard
  localparam int unsigned AW = $clog2(TAPS);

  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0;
  coef_t wdata = '0;
  coef_t [TAPS-1:0] coef;
  coef_t shadow [TAPS];
  int checks = 0, failures = 0, cycles = 0;

  coeff_lut #(.TAPS(TAPS)) dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr),
                                 .wdata(wdata), .coef(coef));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic compare();
    for (int i = 0; i < TAPS; i++) begin
      checks++;
      if (coef[i] != shadow[i]) begin
        failures++;
        $display("FAIL entry %0d = %h, expected %h", i, coef[i], shadow[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < TAPS; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare();
    repeat (2000) begin
      we    = 1'($urandom);
      waddr = AW'($urandom);
      wdata = coef_t'($urandom);
      @(posedge clk);
      if (we && 32'(waddr) < TAPS) shadow[waddr] = wdata;
      #1 compare();
    end
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < TAPS; i++) shadow[i] = '0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
