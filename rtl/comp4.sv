// 4-bit equality comparator (COMP) of the control logic generator.
//
// Four bitwise equality gates (XNOR) feed a 4-input AND, so eq is 1 exactly
// when a and b are equal. Structure as drawn for the document's COMP.
// Combinational.
module comp4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic       eq
);

  logic [3:0] same;

  always_comb begin
    same = ~(a ^ b);
    eq   = &same;
  end

endmodule
