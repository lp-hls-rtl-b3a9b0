// ALU divide unit, placed in its own switchable power domain.
// Unsigned W-bit division with a registered result y = {remainder, quotient}:
// when en is high at a rising edge of the (gated) domain clock the result is
// loaded, otherwise y holds. One clock of latency. Division by zero gives a
// quotient of all ones and a remainder equal to a. Signedness, latency and the
// divide-by-zero result are this design's choice.
module alu_div #(
  parameter int unsigned W = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] y
);

  logic [W-1:0] q, r;

  always_comb begin
    if (b == '0) begin
      q = '1;
      r = a;
    end else begin
      q = a / b;
      r = a % b;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= {r, q};
  end

endmodule
