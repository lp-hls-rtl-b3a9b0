// Self-checking testbench for alu_lp.
// Runs four synthetic activity profiles (divider / multiplier domain in use
// for 30/60 %, 20/50 %, 10/40 % and 1/10 % of the time). The stimulus keeps
// each switchable domain requested on or off in random-length runs with the
// profile's share, issues MULTIPLY (DIVIDE) only while that domain is
// requested on and mostly other functions otherwise, and also issues a few
// MULTIPLY/DIVIDE to a sleeping unit. Every result is compared, one clock
// after issue, with a reference computed here:
//   - simple functions: exact result, out_valid = 1;
//   - MULTIPLY/DIVIDE with the domain active at issue and at read: exact,
//     out_valid = 1;
//   - domain isolated at read: out = 0, out_valid = 0.
// It counts, and requires, shut-offs and wake-ups of both domains,
// valid results of all eight functions and isolated reads.
module tb_alu_lp;
  import lp_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic [7:0]  sel = '0;
  logic [15:0] a = '0, b = '0;
  logic        mp = 1'b0, dp = 1'b0;
  logic [31:0] out;
  logic        out_valid, mul_ready, div_ready, mul_vdd, div_vdd;
  int          checks = 0, failures = 0;
  int          op_seen [8];
  int          iso_reads = 0, mul_offs = 0, div_offs = 0;

  alu_lp u_dut (.clk, .rst_n, .sel, .a, .b, .mp, .dp, .out, .out_valid,
                .mul_ready, .div_ready, .mul_vdd, .div_vdd);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_op(input int op, input logic [15:0] x, input logic [15:0] y);
    case (op)
      0: return {16'h0, x & y};
      1: return {16'h0, x | y};
      2: return 32'(x) + 32'(y);
      3: return (32'(x) - 32'(y)) & 32'h1ffff;
      4: return {16'h0, 16'(32'(x) << y[3:0])};
      5: return {16'h0, x >> y[3:0]};
      6: return 32'(x) * 32'(y);
      default: return (y == 0) ? {x, 16'hffff} : {16'(x % y), 16'(x / y)};
    endcase
  endfunction

  logic prev_mul_vdd = 1'b1, prev_div_vdd = 1'b1;
  always @(posedge clk) begin
    if (prev_mul_vdd && !mul_vdd) mul_offs++;
    if (prev_div_vdd && !div_vdd) div_offs++;
    prev_mul_vdd <= mul_vdd;
    prev_div_vdd <= div_vdd;
  end

  task automatic run_profile(input int div_pct, input int mul_pct, input int ncyc);
    int mleft = 0, dleft = 0, mon = 0, don = 0;
    for (int c = 0; c < ncyc; c++) begin
      int          op;
      logic        mul_rdy_issue, div_rdy_issue;
      logic [31:0] exp_out;
      @(negedge clk);
      if (mleft == 0) begin mp = !($urandom_range(0, 99) < mul_pct); mleft = $urandom_range(8, 60); end
      if (dleft == 0) begin dp = !($urandom_range(0, 99) < div_pct); dleft = $urandom_range(8, 60); end
      mleft--;
      dleft--;
      if (!mp) mon++;
      if (!dp) don++;
      op = $urandom_range(0, 7);
      if (op == 6 && mp && $urandom_range(0, 9) != 0) op = $urandom_range(0, 5);
      if (op == 7 && dp && $urandom_range(0, 9) != 0) op = $urandom_range(0, 5);
      sel = 8'(1 << op);
      a = 16'($urandom);
      b = (op == 7 && $urandom_range(0, 20) == 0) ? 16'h0000 : 16'($urandom);
      exp_out = ref_op(op, a, b);
      mul_rdy_issue = mul_ready;
      div_rdy_issue = div_ready;
      @(posedge clk) #1;
      if ((op == 6 && !mul_ready) || (op == 7 && !div_ready)) begin
        checks++;
        if (out !== '0 || out_valid !== 1'b0) begin
          failures++;
          $display("%0t op %0d read while isolated: out=%h valid=%b", $time, op, out, out_valid);
        end
        iso_reads++;
      end else begin
        logic exp_valid;
        exp_valid = (op == 6) ? mul_rdy_issue : (op == 7) ? div_rdy_issue : 1'b1;
        checks++;
        if (out !== exp_out || out_valid !== exp_valid) begin
          failures++;
          $display("%0t op %0d a=%h b=%h: out=%h valid=%b expected %h %b", $time, op, a, b, out, out_valid, exp_out, exp_valid);
        end
        if (exp_valid) op_seen[op]++;
      end
    end
    $display("profile DIV %0d%% MULT %0d%%: divider requested on %0d, multiplier %0d of %0d clocks",
             div_pct, mul_pct, don, mon, ncyc);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    run_profile(30, 60, 5000);
    run_profile(20, 50, 5000);
    run_profile(10, 40, 5000);
    run_profile(1, 10, 5000);
    $display("valid results per function: %p; isolated reads %0d; shut-offs mul %0d div %0d",
             op_seen, iso_reads, mul_offs, div_offs);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (op_seen[i] == 0) begin failures++; $display("function %0d never produced a valid result", i); end
    end
    checks += 3;
    if (iso_reads == 0) begin failures++; $display("no isolated read"); end
    if (mul_offs == 0) begin failures++; $display("multiplier never shut off"); end
    if (div_offs == 0) begin failures++; $display("divider never shut off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
