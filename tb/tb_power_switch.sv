// Self-checking testbench for the power_switch model: vdd must drop in the
// cycle pse falls and come back exactly RAMP_CYCLES clocks after pse rises,
// checked for ramps of 0 (default) and 4.
module tb_power_switch;
  logic clk = 1'b0, rst_n = 1'b1, pse = 1'b1;
  logic vdd0, vdd4;
  int   checks = 0, failures = 0;

  power_switch                  u_dut0 (.clk, .rst_n, .pse, .vdd(vdd0));
  power_switch #(.RAMP_CYCLES(4)) u_dut4 (.clk, .rst_n, .pse, .vdd(vdd4));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic e0, input logic e4, input string what);
    checks++;
    if (vdd0 !== e0 || vdd4 !== e4) begin
      failures++;
      $display("%0t %s: vdd0=%b vdd4=%b expected %b %b", $time, what, vdd0, vdd4, e0, e4);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #1;
    check(1, 1, "reset");
    #10 rst_n = 1'b1;
    @(posedge clk) #1;
    repeat (3) begin
      pse = 1'b0;
      #1 check(0, 0, "pse low");
      repeat (3) begin @(posedge clk); #1 check(0, 0, "off"); end
      pse = 1'b1;
      #1 check(1, 0, "pse high");
      for (int i = 1; i <= 6; i++) begin
        @(posedge clk); #1 check(1, i >= 4, "ramp");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
