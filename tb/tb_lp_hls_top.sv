// End-to-end testbench for lp_hls_top at its default parameters.
// The three designs run at the same time, each with its own stimulus and
// reference:
//   RCA : random operands, upper half switched on and off in random runs;
//         16-bit results while shut off, 32-bit once ready, isolated upper
//         half during wake-up.
//   ALU : random functions with the multiplier and divider domains switched
//         in runs; exact results from powered units, 0 / not valid from
//         isolated ones.
//   IDCT: bursts of coefficient blocks with sleep requests in the gaps;
//         pixels within 1 of a floating-point IDCT, no block lost.
// Every power mechanism must happen at least once: shut-off and wake-up in
// each of the four domains, isolated reads in RCA and ALU, FIFO buffering
// during an IDCT wake-up, an IDCT sleep request refused while busy.
module tb_lp_hls_top;
  `include "idct_ref.svh"
  logic        clk = 1'b0, rst_n = 1'b1;
  int          checks = 0, failures = 0;

  // RCA
  logic [31:0] rca_a = '0, rca_b = '0, rca_s;
  logic        rca_cin = 1'b0, rca_p_shutoff = 1'b0, rca_cout, rca_msb_ready, rca_msb_vdd;
  // ALU
  logic [7:0]  alu_sel = 8'h01;
  logic [15:0] alu_a = '0, alu_b = '0;
  logic        alu_mp = 1'b0, alu_dp = 1'b0;
  logic [31:0] alu_out;
  logic        alu_out_valid, alu_mul_ready, alu_div_ready, alu_mul_vdd, alu_div_vdd;
  // IDCT
  logic        idct_sleep_req = 1'b0, idct_in_valid = 1'b0, idct_in_ready;
  logic [11:0] idct_in_data = '0;
  logic        idct_out_valid, idct_out_ready = 1'b1, idct_active;
  logic [7:0]  idct_out_data;

  lp_hls_top u_dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // mechanism counters
  int rca16 = 0, rca32 = 0, rca_iso = 0, alu_iso = 0, idct_buf = 0, idct_guard = 0;
  int off_rca = 0, off_mul = 0, off_div = 0, off_idct = 0;
  int on_rca = 0, on_mul = 0, on_div = 0, on_idct = 0;
  logic [3:0] vdd_prev = 4'hf;
  always @(posedge clk) begin
    logic [3:0] v;
    v = {rca_msb_vdd, alu_mul_vdd, alu_div_vdd, u_dut.u_idct.vdd};
    if (vdd_prev[3] && !v[3]) off_rca++;
    if (vdd_prev[2] && !v[2]) off_mul++;
    if (vdd_prev[1] && !v[1]) off_div++;
    if (vdd_prev[0] && !v[0]) off_idct++;
    if (!vdd_prev[3] && v[3]) on_rca++;
    if (!vdd_prev[2] && v[2]) on_mul++;
    if (!vdd_prev[1] && v[1]) on_div++;
    if (!vdd_prev[0] && v[0]) on_idct++;
    vdd_prev <= v;
    if (!idct_active && u_dut.u_idct.f_count != 0) idct_buf++;
    if (idct_sleep_req && !u_dut.u_idct.d_idle && idct_active) idct_guard++;
  end

  localparam int NCYC = 30000;

  task automatic rca_run();
    int left = 0;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      if (left == 0) begin
        rca_p_shutoff = 1'($urandom);
        left = $urandom_range(4, 50);
      end
      left--;
      rca_a = $urandom;
      rca_b = $urandom;
      rca_cin = 1'($urandom);
      #1;
      if (rca_p_shutoff || !rca_msb_ready) begin
        logic [16:0] r;
        r = 17'(rca_a[15:0]) + 17'(rca_b[15:0]) + 17'(rca_cin);
        if (rca_p_shutoff) begin
          check(rca_s == {16'h0, r[15:0]} && rca_cout == r[16], "RCA 16-bit result");
          rca16++;
        end else begin
          check(rca_s == {16'h0, r[15:0]} && rca_cout == 1'b0, "RCA isolated during wake-up");
          rca_iso++;
        end
      end else begin
        check({rca_cout, rca_s} == 33'(rca_a) + 33'(rca_b) + 33'(rca_cin), "RCA 32-bit result");
        rca32++;
      end
    end
  endtask

  function automatic logic [31:0] alu_ref(input int op, input logic [15:0] x, input logic [15:0] y);
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

  task automatic alu_run();
    int ml = 0, dl = 0;
    for (int c = 0; c < NCYC; c++) begin
      int op;
      logic mr, dr;
      logic [31:0] e;
      @(negedge clk);
      if (ml == 0) begin alu_mp = ($urandom_range(0, 1) == 0); ml = $urandom_range(8, 60); end
      if (dl == 0) begin alu_dp = ($urandom_range(0, 2) != 0); dl = $urandom_range(8, 60); end
      ml--;
      dl--;
      op = $urandom_range(0, 7);
      alu_sel = 8'(1 << op);
      alu_a = 16'($urandom);
      alu_b = 16'($urandom);
      e = alu_ref(op, alu_a, alu_b);
      mr = alu_mul_ready;
      dr = alu_div_ready;
      @(posedge clk) #1;
      if ((op == 6 && !alu_mul_ready) || (op == 7 && !alu_div_ready)) begin
        check(alu_out == '0 && !alu_out_valid, "ALU isolated read");
        alu_iso++;
      end else begin
        check(alu_out == e && alu_out_valid == ((op == 6) ? mr : (op == 7) ? dr : 1'b1), "ALU result");
      end
    end
  endtask

  tb_blk_q_t idct_exp;
  int blocks_in = 0, blocks_out = 0, pix_i = 0;
  always @(posedge clk) begin
    if (rst_n && idct_out_valid && idct_out_ready) begin
      int e, d;
      e = idct_exp[0][pix_i];
      d = (int'(idct_out_data) > e) ? int'(idct_out_data) - e : e - int'(idct_out_data);
      check(d <= 1, "IDCT pixel");
      pix_i++;
      if (pix_i == 64) begin
        pix_i = 0;
        void'(idct_exp.pop_front());
        blocks_out++;
      end
    end
  end

  task automatic idct_run();
    int t_end;
    t_end = int'($time / 10) + NCYC - 2000;
    while (int'($time / 10) < t_end) begin
      idct_sleep_req = 1'b0;
      repeat ($urandom_range(1, 3)) begin
        blk_t f;
        f = gen_block($urandom_range(0, 2));
        idct_exp.push_back(idct_ref(f));
        idct_sleep_req = 1'($urandom);
        for (int i = 0; i < 64; i++) begin
          @(negedge clk);
          idct_in_valid = 1'b1;
          idct_in_data = 12'(f[i]);
          do @(posedge clk); while (!idct_in_ready);
        end
        @(negedge clk) idct_in_valid = 1'b0;
        blocks_in++;
      end
      idct_sleep_req = 1'b1;
      repeat ($urandom_range(300, 2000)) @(negedge clk);
    end
    wait (blocks_out == blocks_in);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    fork
      rca_run();
      alu_run();
      idct_run();
    join
    $display("RCA: 16-bit %0d, 32-bit %0d, isolated %0d; ALU isolated reads %0d; IDCT blocks %0d, buffered %0d, refused sleeps %0d",
             rca16, rca32, rca_iso, alu_iso, blocks_out, idct_buf, idct_guard);
    $display("shut-offs rca %0d mul %0d div %0d idct %0d; wake-ups %0d %0d %0d %0d",
             off_rca, off_mul, off_div, off_idct, on_rca, on_mul, on_div, on_idct);
    check(rca16 > 0 && rca32 > 0 && rca_iso > 0, "RCA mechanisms");
    check(alu_iso > 0, "ALU isolated read seen");
    check(off_rca > 0 && off_mul > 0 && off_div > 0 && off_idct > 0, "every domain shut off");
    check(on_rca > 0 && on_mul > 0 && on_div > 0 && on_idct > 0, "every domain woke up");
    check(idct_buf > 0, "FIFO buffered during IDCT wake-up");
    check(idct_guard > 0, "IDCT sleep request held off while busy");
    check(blocks_out == blocks_in && blocks_in > 0, "no IDCT block lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
