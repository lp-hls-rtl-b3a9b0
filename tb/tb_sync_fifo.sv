// Self-checking testbench for sync_fifo.
// Random push and pop traffic against a queue model: every popped word must
// be the oldest pushed one, in_ready must drop exactly when DEPTH words are
// held, out_valid exactly when none. Phases with pops stalled make it fill
// up (as while a domain is waking up).
module tb_sync_fifo;
  localparam int DEPTH = 16;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        in_valid = 1'b0, out_ready = 1'b0;
  logic        in_ready, out_valid;
  logic [11:0] in_data = '0, out_data;
  logic [4:0]  count;
  int          checks = 0, failures = 0, fulls = 0;
  logic [11:0] model [$];

  sync_fifo u_dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%0t %s", $time, what);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      in_valid  = 1'($urandom);
      in_data   = 12'($urandom);
      out_ready = ((cyc / 200) % 2 == 1) ? 1'($urandom) : 1'b0 | (($urandom % 4) == 0);
      #1;
      check(in_ready == (model.size() < DEPTH), "in_ready");
      check(out_valid == (model.size() > 0), "out_valid");
      check(int'(count) == model.size(), "count");
      if (out_valid) check(out_data == model[0], "data order");
      if (!in_ready) fulls++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    check(fulls > 0, "fifo reached full");
    $display("full seen %0d times", fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
