// Self-checking testbench for rca32_lp.
// Random operands every clock while p_shutoff switches the upper half on
// and off in random-length runs. Five activity profiles keep the upper
// domain requested on for 10, 30, 50, 70 and 90 % of the time. Every clock:
//   p_shutoff = 1           : sum must be the zero-extended 16-bit sum and
//                             c_out the carry out of bit 15
//   p_shutoff = 0, ready    : full 32-bit sum and carry
//   p_shutoff = 0, waking   : upper half isolated (reads 0, carry 0)
// Power-up latency (p_shutoff falling to msb_ready) must be three clocks, and
// the supply must be off while the domain is off. Each mechanism (16-bit mode,
// 32-bit mode, isolated wake-up, full power cycle) must be seen.
module tb_rca32_lp;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic [31:0] a = '0, b = '0, s_out;
  logic        cin = 1'b0, p_shutoff = 1'b0, c_out, msb_ready, msb_vdd;
  int          checks = 0, failures = 0;
  int          n16 = 0, n32 = 0, nwake = 0, ncycles_pwr = 0;

  rca32_lp u_dut (.clk, .rst_n, .a, .b, .cin, .p_shutoff, .s_out, .c_out, .msb_ready, .msb_vdd);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%0t %s: a=%h b=%h cin=%b s=%h c=%b shut=%b ready=%b", $time, what, a, b, cin, s_out, c_out, p_shutoff, msb_ready);
    end
  endtask

  int since_release = -1;

  task automatic run_profile(input int on_pct, input int ncyc);
    int on_cycles = 0, vdd_cycles = 0, left = 0;
    for (int c = 0; c < ncyc; c++) begin
      @(negedge clk);
      if (left == 0) begin
        logic want_on;
        want_on = ($urandom_range(0, 99) < on_pct);
        if (p_shutoff && want_on && u_dut.pmb_state == lp_pkg::PMB_OFF) since_release = 0;
        p_shutoff = !want_on;
        left = $urandom_range(4, 40);
      end
      left--;
      a   = $urandom;
      b   = $urandom;
      cin = 1'($urandom);
      #1;
      // wake-up latency: one clock to sample the release, two power-up clocks
      if (since_release >= 0) begin
        if (msb_ready) begin
          check(since_release == 3, "power-up latency");
          since_release = -1;
          ncycles_pwr++;
        end else since_release++;
      end
      if (!p_shutoff) on_cycles++;
      if (msb_vdd) vdd_cycles++;
      if (p_shutoff) begin
        logic [16:0] r16;
        r16 = 17'(a[15:0]) + 17'(b[15:0]) + 17'(cin);
        check(s_out == {16'h0000, r16[15:0]} && c_out == r16[16], "16-bit mode");
        n16++;
      end else if (msb_ready) begin
        logic [32:0] r32;
        r32 = 33'(a) + 33'(b) + 33'(cin);
        check({c_out, s_out} == r32, "32-bit mode");
        n32++;
      end else begin
        logic [16:0] r16;
        r16 = 17'(a[15:0]) + 17'(b[15:0]) + 17'(cin);
        check(s_out == {16'h0000, r16[15:0]} && c_out == 1'b0, "isolated during wake-up");
        nwake++;
      end
      if (u_dut.pmb_state == lp_pkg::PMB_OFF) check(!msb_vdd, "supply off while domain off");
    end
    $display("profile %0d%%: upper half requested on %0d of %0d clocks, supplied %0d", on_pct, on_cycles, ncyc, vdd_cycles);
    checks++;
    if (on_cycles * 100 < (on_pct - 10) * ncyc || on_cycles * 100 > (on_pct + 10) * ncyc) begin
      failures++;
      $display("profile %0d%% missed its target", on_pct);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    run_profile(10, 6000);
    run_profile(30, 6000);
    run_profile(50, 6000);
    run_profile(70, 6000);
    run_profile(90, 6000);
    $display("16-bit ops %0d, 32-bit ops %0d, isolated wake-up clocks %0d, power-ups %0d", n16, n32, nwake, ncycles_pwr);
    checks += 4;
    if (n16 == 0 || n32 == 0 || nwake == 0 || ncycles_pwr == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
