// Self-checking testbench for pmb.
// Two instances, RAMP_CYCLES = 0 (default) and 3, get the same power-control
// flag. After every clock the outputs are compared with the expected shut-off
// protocol: power down is iso, then retention, then switch off and clock gate
// one clock apart; power up is switch on and clock released, then (after the
// ramp) retention off, then isolation off. The cycles spent in transition
// for one down+up pair are counted and must be four with no ramp.
module tb_pmb;
  import lp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic pwr_ctrl = 1'b0;
  int   checks = 0, failures = 0;

  logic iso0, ret0, pse0, cg0, act0;
  logic iso3, ret3, pse3, cg3, act3;
  pmb_state_e st0, st3;

  pmb u_dut0 (.clk, .rst_n, .pwr_ctrl, .iso_en(iso0), .ret_en(ret0), .pse(pse0),
              .clk_gate(cg0), .active(act0), .state(st0));
  pmb #(.RAMP_CYCLES(3)) u_dut3 (.clk, .rst_n, .pwr_ctrl, .iso_en(iso3), .ret_en(ret3), .pse(pse3),
              .clk_gate(cg3), .active(act3), .state(st3));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {iso, ret, pse, cg, active}
  task automatic expect0(input logic [4:0] e, input string what);
    checks++;
    if ({iso0, ret0, pse0, cg0, act0} !== e) begin
      failures++;
      $display("%0t ramp0 %s: got %b expected %b", $time, what, {iso0, ret0, pse0, cg0, act0}, e);
    end
  endtask
  task automatic expect3(input logic [4:0] e, input string what);
    checks++;
    if ({iso3, ret3, pse3, cg3, act3} !== e) begin
      failures++;
      $display("%0t ramp3 %s: got %b expected %b", $time, what, {iso3, ret3, pse3, cg3, act3}, e);
    end
  endtask

  localparam logic [4:0] ACT  = 5'b00101;
  localparam logic [4:0] ISO  = 5'b10100;
  localparam logic [4:0] RET  = 5'b11100;
  localparam logic [4:0] OFF  = 5'b11010;
  localparam logic [4:0] UPW  = 5'b11100;
  localparam logic [4:0] UPR  = 5'b10100;

  int trans0;
  always @(posedge clk) if (rst_n && !act0 && st0 != PMB_OFF) trans0++;

  task automatic step();
    @(posedge clk);
    #1;
  endtask

  initial begin
    trans0 = 0;
    #1 rst_n = 1'b0;
    #1;
    expect0(ACT, "reset");
    step(); step();
    rst_n = 1'b1;
    step();
    expect0(ACT, "after reset");
    // power down, ramp 0 and ramp 3 behave the same
    pwr_ctrl = 1'b1;
    step(); expect0(ISO, "down 1"); expect3(ISO, "down 1");
    step(); expect0(RET, "down 2"); expect3(RET, "down 2");
    step(); expect0(OFF, "off");    expect3(OFF, "off");
    repeat (5) begin step(); expect0(OFF, "stay off"); expect3(OFF, "stay off"); end
    // power up
    pwr_ctrl = 1'b0;
    step(); expect0(UPW, "up 1"); expect3(UPW, "up 1");
    step(); expect0(UPR, "up 2"); expect3(UPW, "ramp 1");
    step(); expect0(ACT, "active"); expect3(UPW, "ramp 2");
    step(); expect0(ACT, "active"); expect3(UPW, "ramp 3");
    step(); expect0(ACT, "active"); expect3(UPR, "up 2");
    step(); expect0(ACT, "active"); expect3(ACT, "active");
    checks++;
    if (trans0 != 4) begin
      failures++;
      $display("transition cycles %0d, expected 4", trans0);
    end
    // a one-cycle request still runs the whole sequence, and a release during
    // power down only takes effect once the domain is off
    pwr_ctrl = 1'b1;
    step(); expect0(ISO, "short down 1");
    pwr_ctrl = 1'b0;
    step(); expect0(RET, "short down 2");
    step(); expect0(OFF, "short off");
    step(); expect0(UPW, "short up 1");
    step(); expect0(UPR, "short up 2");
    step(); expect0(ACT, "short active");
    // held request keeps the domain active-free for many cycles
    pwr_ctrl = 1'b1;
    repeat (3) step();
    repeat (20) begin step(); expect0(OFF, "long off"); end
    pwr_ctrl = 1'b0;
    repeat (3) step();
    expect0(ACT, "long active");
    repeat (10) begin step(); expect0(ACT, "stay active"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
