// ALU function-select encoder.
//
// Turns the one-hot select sel[7:0] (bit i asks for function i in the order
// AND, OR, ADD, SUBTRACT, SHIFT_L, SHIFT_R, MULTIPLY, DIVIDE) into the 3-bit
// opcode en that enables a function unit and steers the output multiplexer.
// If more than one bit is set the lowest wins; sel_valid = 0 when no bit is
// set (en is then OP_AND). Combinational. The one-hot format and priority rule
// are this design's choice.
module alu_encoder
  import lp_pkg::*;
(
  input  logic [7:0] sel,
  output alu_op_e    en,
  output logic       sel_valid
);

  always_comb begin
    en = OP_AND;
    for (int i = 7; i >= 0; i--) begin
      if (sel[i]) en = alu_op_e'(i[2:0]);
    end
  end

  assign sel_valid = |sel;

endmodule
