// Testbench of sample_delay_line: random samples with random gaps in en;
// after each edge taps[k] must hold the k-th most recent accepted sample,
// kept in a shadow history; reset must clear the line.
module tb_sample_delay_line;
  import vhbcse_pkg::*;

  localparam int unsigned TAPS = 6;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  sample_t x_in = '0;
  sample_t [TAPS-1:0] taps;
  sample_t hist [TAPS];
  int checks = 0, failures = 0, cycles = 0;

  sample_delay_line #(.TAPS(TAPS)) dut (.clk(clk), .rst_n(rst_n), .en(en),
                                         .x_in(x_in), .taps(taps));

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
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (taps[k] != hist[k]) begin
        failures++;
        $display("FAIL tap %0d = %h, expected %h", k, taps[k], hist[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare();
    repeat (2000) begin
      en   = ($urandom % 4) != 0;
      x_in = sample_t'($urandom);
      @(posedge clk);
      if (en) begin
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x_in;
      end
      #1 compare();
    end
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
