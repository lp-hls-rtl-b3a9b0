// Self-checking testbench for idct8x8 (always powered: vdd = 1, ret_en = 0).
// Random coefficient blocks go in back to back; each pixel must lie within
// 1 of the floating-point reference (fixed-point rounding). With the output
// never stalled a block occupies 256 clocks: the edge that takes its first
// coefficient and the edge that hands out its last pixel are 255 clocks
// apart. A second run stalls the output at random.
module tb_idct8x8;
  `include "idct_ref.svh"

  logic              clk = 1'b0, rst_n = 1'b1;
  logic              in_valid = 1'b0, out_ready = 1'b1;
  logic              in_ready, out_valid, idle;
  logic signed [11:0] in_data = '0;
  logic [7:0]        out_data;
  int                checks = 0, failures = 0;
  blk_t              exp_q [$];
  int                pix_i = 0, blocks_out = 0, maxerr = 0;
  bit                stall = 1'b0;

  idct8x8 u_dut (.clk, .aon_clk(clk), .rst_n, .vdd(1'b1), .ret_en(1'b0), .in_valid, .in_ready, .in_data,
                 .out_valid, .out_ready, .out_data, .idle);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side
  always @(negedge clk) out_ready <= stall ? 1'($urandom) : 1'b1;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int e, d;
      e = exp_q[0][pix_i];
      d = (int'(out_data) > e) ? int'(out_data) - e : e - int'(out_data);
      if (d > maxerr) maxerr = d;
      checks++;
      if (d > 1) begin
        failures++;
        $display("block %0d pixel %0d: got %0d expected %0d", blocks_out, pix_i, out_data, e);
      end
      pix_i++;
      if (pix_i == 64) begin
        pix_i = 0;
        void'(exp_q.pop_front());
        blocks_out++;
      end
    end
  end

  task automatic send_block(input int kind, output int t_start);
    blk_t f;
    f = gen_block(kind);
    exp_q.push_back(idct_ref(f));
    t_start = -1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = 12'(f[i]);
      do @(posedge clk); while (!in_ready);
      if (i == 0) t_start = int'($time / 10);
    end
    @(negedge clk) in_valid = 1'b0;
  endtask

  initial begin
    int t0, t1;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (!idle) begin failures++; $display("not idle after reset"); end
    // latency of one block, output not stalled
    send_block(0, t0);
    wait (blocks_out == 1);
    t1 = int'($time / 10);
    checks++;
    if (t1 - t0 != 255) begin failures++; $display("block took %0d clocks, expected 255", t1 - t0); end
    for (int n = 0; n < 12; n++) send_block(n % 3, t0);
    stall = 1'b1;
    for (int n = 0; n < 6; n++) send_block(n % 3, t0);
    wait (blocks_out == 19);
    $display("blocks %0d, largest pixel error %0d", blocks_out, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
