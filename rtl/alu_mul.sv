// ALU multiply unit, placed in its own switchable power domain.
// Unsigned W x W multiply with a registered 2*W-bit product: when en is high
// at a rising edge of the (gated) domain clock, y <= a * b; otherwise y holds.
// One clock of latency. Signedness and latency are this design's choice.
module alu_mul #(
  parameter int unsigned W = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= (2*W)'(a) * (2*W)'(b);
  end

endmodule
