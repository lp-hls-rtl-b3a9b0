// Self-checking testbench for idct_lp, the power-gated IDCT block.
// A decoder model sends 8x8 coefficient blocks in bursts separated by idle
// gaps and raises sleep_req in the gaps (and, to test the guard, at random
// inside bursts). Four runs shorten the gaps so that the domain is switched
// about 1x, 4x, 8x and 32x as often. Checks:
//   - every pixel within 1 of the floating-point IDCT, no block lost;
//   - the domain is never off or in transition while the IDCT holds a block;
//   - coefficients arriving while the domain sleeps are held in the FIFO and
//     processed after the wake-up;
//   - power-down and wake-up sequences, FIFO buffering during wake-up, output
//     stalls and mid-burst sleep requests all happen.
module tb_idct_lp;
  `include "idct_ref.svh"
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        sleep_req = 1'b0, in_valid = 1'b0, out_ready = 1'b1;
  logic        in_ready, out_valid, idct_active;
  logic [11:0] in_data = '0;
  logic [7:0]  out_data;
  int          checks = 0, failures = 0;
  blk_t        exp_q [$];
  int          pix_i = 0, blocks_in = 0, blocks_out = 0;
  int          n_down = 0, n_up = 0, n_buffered = 0, n_stall = 0, n_guard = 0;
  bit          stall = 1'b0;

  idct_lp u_dut (.clk, .rst_n, .sleep_req, .in_valid, .in_ready, .in_data,
                 .out_valid, .out_ready, .out_data, .idct_active);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready <= stall ? ($urandom_range(0, 3) != 0) : 1'b1;

  lp_pkg::pmb_state_e prev_state = lp_pkg::PMB_ACTIVE;
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        int e, d;
        e = exp_q[0][pix_i];
        d = (int'(out_data) > e) ? int'(out_data) - e : e - int'(out_data);
        checks++;
        if (d > 1) begin
          failures++;
          $display("%0t block %0d pixel %0d: got %0d expected %0d", $time, blocks_out, pix_i, out_data, e);
        end
        pix_i++;
        if (pix_i == 64) begin
          pix_i = 0;
          void'(exp_q.pop_front());
          blocks_out++;
        end
      end
      if (!out_ready && out_valid) n_stall++;
      if (!u_dut.d_idle && u_dut.vdd) begin
        checks++;
        if (u_dut.pmb_state != lp_pkg::PMB_ACTIVE) begin
          failures++;
          $display("%0t domain left ACTIVE while the IDCT was busy", $time);
        end
        if (sleep_req) n_guard++;
      end
      if (!idct_active && u_dut.f_count != 0) n_buffered++;
      if (prev_state == lp_pkg::PMB_ACTIVE && u_dut.pmb_state == lp_pkg::PMB_DN_ISO) n_down++;
      if (prev_state == lp_pkg::PMB_OFF && u_dut.pmb_state == lp_pkg::PMB_UP_PWR) n_up++;
      prev_state <= u_dut.pmb_state;
    end
  end

  task automatic send_block(input int kind);
    blk_t f;
    f = gen_block(kind);
    exp_q.push_back(idct_ref(f));
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      in_data  = 12'(f[i]);
      if (!in_valid) begin
        @(negedge clk);
        in_valid = 1'b1;
      end
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk) in_valid = 1'b0;
    blocks_in++;
  endtask

  task automatic run(input int gap_div, input int nbursts);
    int down0, t0;
    down0 = n_down;
    t0 = int'($time / 10);
    for (int n = 0; n < nbursts; n++) begin
      sleep_req = 1'b0;
      repeat ($urandom_range(1, 3)) begin
        sleep_req = ($urandom_range(0, 3) == 0);
        send_block($urandom_range(0, 2));
      end
      sleep_req = 1'b1;
      repeat ($urandom_range(12000, 16000) / gap_div) @(negedge clk);
    end
    wait (blocks_out == blocks_in);
    $display("gap scale 1/%0d: %0d power-downs in %0d clocks", gap_div, n_down - down0, int'($time / 10) - t0);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    run(1, 6);
    run(4, 6);
    run(8, 6);
    stall = 1'b1;
    run(32, 6);
    stall = 1'b0;
    $display("blocks %0d in %0d out; downs %0d ups %0d; clocks with data buffered while not active %0d; stalls %0d; busy clocks with sleep_req %0d",
             blocks_in, blocks_out, n_down, n_up, n_buffered, n_stall, n_guard);
    checks += 6;
    if (blocks_out != blocks_in) begin failures++; $display("blocks lost"); end
    if (n_down == 0) begin failures++; $display("never powered down"); end
    if (n_up == 0) begin failures++; $display("never woke up"); end
    if (n_buffered == 0) begin failures++; $display("FIFO never buffered during wake-up"); end
    if (n_stall == 0) begin failures++; $display("output never stalled"); end
    if (n_guard == 0) begin failures++; $display("no sleep request while busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
