// Reconfigurable FIR filter built on VHBCSE constant multipliers.
//
//   y[n] = sum_{k=0}^{TAPS-1} h[k] * x[n-k] / 2^16
//
// Samples x (16-bit unsigned) enter a delay line; each tap multiplies its
// sample by its coefficient h[k] (17-bit two's complement, a fraction in
// [-1, 1)) in its own vhbcse_cm, and an adder tree sums the 17-bit signed
// products into a (17 + clog2(TAPS))-bit result, wide enough never to
// overflow. The coefficients live in coeff_lut and can be rewritten at any
// time, one tap per cycle.
//
// Timing: a sample presented with x_valid is taken into the delay line on
// a rising edge; on the next rising edge the sum is registered in y_out
// and y_valid is high for one cycle. The coefficients used are those held
// in the LUT during that cycle. A synchronous active-low reset clears the
// delay line, the LUT and the output.
//
// The multiplier, the sample register and the coefficient LUT follow the
// document; the number of taps, the direct-form structure, the output
// register and the write port are this design's choices. The per-tap
// sharing flags of the multipliers are kept on an internal net, shared,
// for observation in simulation only; nothing reads them.
module fir_filter
  import vhbcse_pkg::*;
#(
  parameter int unsigned TAPS = 8,
  localparam int unsigned AW  = (TAPS > 1) ? $clog2(TAPS) : 1,
  localparam int unsigned OW  = YW + AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_valid,
  input  sample_t       x_in,
  input  logic          coef_we,
  input  logic [AW-1:0] coef_addr,
  input  coef_t         coef_wdata,
  output logic          y_valid,
  output logic [OW-1:0] y_out
);

  sample_t [TAPS-1:0] taps;
  coef_t   [TAPS-1:0] coef;
  prod_t   [TAPS-1:0] prod;
  logic    [TAPS-1:0][3:0] shared;   // sharing flags per tap, observation only
  logic    [OW-1:0]   sum;
  logic               sum_valid;

  sample_delay_line #(.TAPS(TAPS)) u_line (
    .clk(clk), .rst_n(rst_n), .en(x_valid), .x_in(x_in), .taps(taps)
  );

  coeff_lut #(.TAPS(TAPS)) u_lut (
    .clk(clk), .rst_n(rst_n), .we(coef_we), .waddr(coef_addr),
    .wdata(coef_wdata), .coef(coef)
  );

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    vhbcse_cm u_cm (.xin(taps[k]), .h(coef[k]), .y(prod[k]), .shared(shared[k]));
  end

  always_comb begin
    sum = '0;
    for (int k = 0; k < TAPS; k++) sum = sum + OW'($signed(prod[k]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_valid <= 1'b0;
      y_valid   <= 1'b0;
      y_out     <= '0;
    end else begin
      sum_valid <= x_valid;
      y_valid   <= sum_valid;
      if (sum_valid) y_out <= sum;
    end
  end

endmodule
