// Self-checking testbench for alu_encoder: every one-hot select must give
// its function's opcode, multi-bit selects the lowest set bit, and an empty
// select must clear sel_valid.
module tb_alu_encoder;
  import lp_pkg::*;
  logic [7:0] sel;
  alu_op_e    en;
  logic       sel_valid;
  int         checks = 0, failures = 0;

  alu_encoder u_dut (.sel, .en, .sel_valid);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static alu_op_e order [8] = '{OP_AND, OP_OR, OP_ADD, OP_SUB, OP_SHL, OP_SHR, OP_MUL, OP_DIV};
    for (int s = 0; s < 256; s++) begin
      int low;
      sel = 8'(s);
      #1;
      low = 0;
      while (low < 8 && !sel[low]) low++;
      checks++;
      if (sel_valid !== (s != 0) || (s != 0 && en !== order[low])) begin
        failures++;
        $display("sel=%b en=%0d valid=%b", sel, en, sel_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
