// Self-checking testbench for clock_gate.
// Counts gated clock edges for known enable patterns, including enable
// changes in the high phase of clk, which must not cut a pulse short and
// must only take effect at the following rising edge.
module tb_clock_gate;
  logic clk = 1'b0;
  logic en  = 1'b0;
  logic gclk;
  int   checks = 0, failures = 0;
  int   gedges = 0;

  clock_gate u_dut (.clk, .en, .gclk);

  always #5 clk = ~clk;
  always @(posedge gclk) gedges++;

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%0t %s (gclk edges %0d)", $time, what, gedges);
    end
  endtask

  initial begin
    // enabled while clk is low n_prev the first edge
    en = 1'b1;
    repeat (10) @(posedge clk);
    #1 check(gedges == 10, "10 edges with en=1");
    // disable in the high phase: gclk stays high until clk falls, then stops
    en = 1'b0;
    #1 check(gclk == 1'b1, "pulse not cut when en falls in high phase");
    @(negedge clk) #1 check(gclk == 1'b0, "gclk low after clk falls");
    gedges = 0;
    repeat (10) @(posedge clk);
    #1 check(gedges == 0, "no edges with en=0");
    // enable in the high phase: no pulse until the next rising edge
    en = 1'b1;
    #1 check(gclk == 1'b0, "no pulse when en rises in high phase");
    repeat (5) @(posedge clk);
    #1 check(gedges == 5, "5 edges after re-enable");
    // random enable pattern, set while clk is low
    for (int i = 0; i < 200; i++) begin
      logic e;
      int   n_prev;
      @(negedge clk);
      e = 1'($urandom);
      en = e;
      n_prev = gedges;
      @(posedge clk) #1;
      check(gedges == n_prev + int'(e), "random enable");
      check(gclk == (clk & e), "gclk value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
