// W-bit ripple-carry adder (16 bits by default), the building block of the
// 32-bit power-gated adder: one instance forms the low half, a second one the
// upper half in the switchable domain. A chain of full adders; the carry
// ripples from bit 0 to bit W-1. Combinational: s = a + b + cin, cout is the
// carry out of the top bit.
module rca16 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end

  assign cout = c[W];

endmodule
