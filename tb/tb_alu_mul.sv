// Self-checking testbench for alu_mul (unsigned multiply).
// Operands applied with en high must give the reference result one clock
// later; with en low the previous result must be held.
module tb_alu_mul;
  logic        clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [15:0] a = '0, b = '0;
  logic [31:0] y, exp_y, held;
  int          checks = 0, failures = 0;

  alu_mul u_dut (.clk, .rst_n, .en, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    held = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a  = (i < 4) ? ((i % 2 == 0) ? 16'hffff : 16'h1234) : 16'($urandom);
      b  = (i < 4) ? ((i < 2) ? 16'h0000 : 16'hffff) : (i % 7 == 0) ? 16'($urandom_range(0, 3)) : 16'($urandom);
      en = (i < 4) ? 1'b1 : 1'($urandom);
      exp_y = 32'(a) * 32'(b);
      @(posedge clk) #1;
      if (en) held = exp_y;
      checks++;
      if (y !== held) begin
        failures++;
        $display("en=%b a=%h b=%h y=%h expected %h", en, a, b, y, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
