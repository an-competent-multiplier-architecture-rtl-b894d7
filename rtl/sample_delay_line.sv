// Input sample register and tap delay line.
//
// On a rising edge with en high, x_in is stored in taps[0] and every older
// sample moves one tap on, so taps[k] holds the sample taken k valid
// samples ago. A synchronous active-low reset clears the line. The
// document says that the samples are stored in a register before the
// multipliers; the direct-form shift register is this design's choice.
module sample_delay_line
  import vhbcse_pkg::*;
#(
  parameter int unsigned TAPS = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  sample_t             x_in,
  output sample_t [TAPS-1:0]  taps
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      taps <= '0;
    end else if (en) begin
      taps[0] <= x_in;
      for (int k = 1; k < TAPS; k++) taps[k] <= taps[k-1];
    end
  end

endmodule
