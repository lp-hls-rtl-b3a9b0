// Self-checking testbench for the ret_reg retention model.
// The register is loaded with random data on a gated clock, then taken
// through a power cycle in the order a PMB uses (retain, gate clock and
// switch off, switch on and ungate, release retention). Its value after the
// cycle must equal the value before it. A second instance that never sees
// ret_en must come back with its state lost. Loads during retention are
// ignored.
module tb_ret_reg;
  logic       clk = 1'b0, rst_n = 1'b1;
  logic       vdd = 1'b1, ret_en = 1'b0, cg = 1'b0, en = 1'b0;
  logic [7:0] d, q, q_nr;
  logic       gclk;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  clock_gate u_cg (.clk, .en(!cg), .gclk);

  ret_reg #(.W(8)) u_dut  (.clk(gclk), .aon_clk(clk), .rst_n, .vdd, .ret_en,        .en, .d, .q);
  ret_reg #(.W(8)) u_nret (.clk(gclk), .aon_clk(clk), .rst_n, .vdd, .ret_en(1'b0), .en, .d, .q(q_nr));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%0t %s: q=%h q_nr=%h", $time, what, q, q_nr);
    end
  endtask

  initial begin
    logic [7:0] saved, saved_nr;
    #1 rst_n = 1'b0;
    #1 check(q == 8'h00, "reset");
    #10 rst_n = 1'b1;
    for (int n = 0; n < 20; n++) begin
      // normal operation
      repeat (3) begin
        @(negedge clk);
        en = 1'b1;
        d  = 8'($urandom);
        @(posedge clk) #1 check(q == d && q_nr == d, "load");
      end
      saved = q;
      // power down: retain, then switch off with the clock gated
      @(negedge clk) begin en = 1'($urandom); d = ~saved; ret_en = 1'b1; end
      @(negedge clk) begin cg = 1'b1; vdd = 1'b0; saved_nr = q_nr; end
      repeat (2 + $urandom_range(0, 5)) @(negedge clk);
      // power up: supply and clock back, then release retention
      vdd = 1'b1;
      cg  = 1'b0;
      @(negedge clk);
      ret_en = 1'b0;
      en = 1'b0;
      @(posedge clk) #1;
      check(q == saved, "value retained across power cycle");
      check(q_nr == ~saved_nr, "value lost without retention");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
