// ALU function unit: subtraction, y = a - b with the borrow in bit W.
// Combinational, operands a and b of W bits, result y of 2*W bits so that all
// units of the ALU share one result bus (upper half zero unless noted).
// The operand width is this design's choice.
module alu_sub #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] y
);

  assign y = {{(W-1){1'b0}}, {1'b0, a} - {1'b0, b}};

endmodule
