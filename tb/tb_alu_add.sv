// Self-checking testbench for alu_add (addition): random and corner operands, the
// 32-bit result compared with a reference computed in the testbench.
module tb_alu_add;
  logic [15:0] a, b;
  logic [31:0] y, exp_y;
  int          checks = 0, failures = 0;

  alu_add u_dut (.a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = (i < 16) ? ((i % 4 == 0) ? 16'h0000 : (i % 4 == 1) ? 16'hffff : (i % 4 == 2) ? 16'h8000 : 16'h0001) : 16'($urandom);
      b = (i < 16) ? ((i / 4 == 0) ? 16'h0000 : (i / 4 == 1) ? 16'hffff : (i / 4 == 2) ? 16'h000f : 16'h0001) : 16'($urandom);
      #1;
      exp_y = 32'(int'(a) + int'(b));
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("a=%h b=%h y=%h expected %h", a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
