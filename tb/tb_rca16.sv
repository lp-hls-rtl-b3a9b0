// Self-checking testbench for rca16: random and corner operands, sum and
// carry compared with 17-bit integer addition.
module tb_rca16;
  logic [15:0] a, b, s;
  logic        cin, cout;
  int          checks = 0, failures = 0;

  rca16 u_dut (.a, .b, .cin, .s, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] ref_sum;
    for (int i = 0; i < 2000; i++) begin
      a   = (i < 4) ? {16{i[0]}} : 16'($urandom);
      b   = (i < 4) ? {16{i[1]}} : 16'($urandom);
      cin = (i < 4) ? 1'b1 : 1'($urandom);
      #1;
      ref_sum = 17'(a) + 17'(b) + 17'(cin);
      checks++;
      if ({cout, s} !== ref_sum) begin
        failures++;
        $display("%h + %h + %b = %h, got %h", a, b, cin, ref_sum, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
