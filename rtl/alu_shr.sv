// ALU function unit: logical shift right of a by the low log2(W) bits of b.
// Combinational, operands a and b of W bits, result y of 2*W bits so that all
// units of the ALU share one result bus (upper half zero unless noted).
// The operand width is this design's choice.
module alu_shr #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] y
);

  localparam int unsigned SW = $clog2(W);

  assign y = {{W{1'b0}}, a >> b[SW-1:0]};

endmodule
