// Coefficient look-up table of the reconfigurable FIR filter.
//
// Holds one 17-bit two's complement coefficient per tap in a register
// array. One write port (we, waddr, wdata) changes an entry on the rising
// clock edge, so the filter can be reprogrammed while it runs; every entry
// is read in parallel on coef, as each tap has its own multiplier. A
// synchronous active-low reset clears all entries. The document only says
// that the coefficients are stored in a LUT; its organisation is this
// design's choice.
module coeff_lut
  import vhbcse_pkg::*;
#(
  parameter int unsigned TAPS = 8,
  localparam int unsigned AW  = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  coef_t               wdata,
  output coef_t [TAPS-1:0]    coef
);

  coef_t mem [TAPS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) mem[i] <= '0;
    end else if (we && (32'(waddr) < TAPS)) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int i = 0; i < TAPS; i++) coef[i] = mem[i];
  end

endmodule
