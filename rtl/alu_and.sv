// ALU function unit: bitwise AND, y = a & b.
// Combinational, operands a and b of W bits, result y of 2*W bits so that all
// units of the ALU share one result bus (upper half zero unless noted).
// The operand width is this design's choice.
module alu_and #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] y
);

  assign y = {{W{1'b0}}, a & b};

endmodule
