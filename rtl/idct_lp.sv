// Power-conscious IDCT block: an 8x8 IDCT in a switchable power domain,
// with the FIFO, PMB, clock gate, power switch and isolation around it.
//
// Coefficients from the decoder enter an always-on FIFO and are passed to the
// IDCT when its domain is active. The domain may sleep when the decoder says
// so (sleep_req = 1), the FIFO is empty and the IDCT is idle; the AND of the
// three is the PMB's shut-off flag. A coefficient arriving while the domain
// is asleep makes the FIFO non-empty, which drops the flag and starts the
// power-up sequence; the FIFO holds the incoming data meanwhile. The PMB's
// clock-gate output, the signal that also triggers power gating, stops the
// domain clock while it is off. Retention keeps the IDCT's control state.
// The FIFO's valid into the domain is masked while isolation is on: the
// domain clock runs during the wake-up clocks, and the IDCT must not take a
// word the FIFO cannot see taken.
// Isolation clamps the domain outputs: out_valid, out_data and in_ready to 0,
// idle to 1 (so a sleeping IDCT reads as idle).
//
// Interface: valid/ready streams in (12-bit signed coefficients, row-major
// 8x8 blocks) and out (8-bit pixels, row-major). Latency per block is that of
// idct8x8 (256 clocks) plus, after a sleep, the power-up sequence (two clocks
// plus RAMP_CYCLES) and one clock for the FIFO. idct_active shows the domain
// state. The partitioning follows the source design; the wake-up rule,
// FIFO depth and clamp values are this design's choices.
module idct_lp
  import lp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned RAMP_CYCLES = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sleep_req,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [11:0] in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output logic        idct_active
);

  logic        f_valid, f_ready;
  logic [11:0] f_data;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;

  sync_fifo #(.W(12), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data), .count(f_count)
  );

  logic       iso_en, ret_en, pse, clk_gate, vdd, gclk, pwr_ctrl;
  logic       idle_iso;
  pmb_state_e pmb_state;

  assign pwr_ctrl = sleep_req && !f_valid && idle_iso;

  pmb #(.RAMP_CYCLES(RAMP_CYCLES)) u_pmb (
    .clk, .rst_n, .pwr_ctrl, .iso_en, .ret_en, .pse, .clk_gate,
    .active(idct_active), .state(pmb_state)
  );

  clock_gate u_cg (.clk, .en(!clk_gate), .gclk);

  power_switch #(.RAMP_CYCLES(RAMP_CYCLES)) u_psw (.clk, .rst_n, .pse, .vdd);

  // switchable domain
  logic       d_in_ready, d_out_valid, d_idle;
  logic [7:0] d_out_data;

  // the domain clock already runs during the wake-up clocks, so the FIFO
  // offers data only once isolation is released, as in_ready is seen then
  logic d_in_valid;
  assign d_in_valid = f_valid && !iso_en;

  idct8x8 #(.CW(12)) u_idct (
    .clk(gclk), .aon_clk(clk), .rst_n, .vdd, .ret_en,
    .in_valid(d_in_valid), .in_ready(d_in_ready), .in_data(f_data),
    .out_valid(d_out_valid), .out_ready, .out_data(d_out_data), .idle(d_idle)
  );

  iso_cell #(.W(10), .CLAMP(1'b0)) u_iso_out (
    .iso_en, .d({d_in_ready, d_out_valid, d_out_data}), .q({f_ready, out_valid, out_data})
  );
  iso_cell #(.W(1), .CLAMP(1'b1)) u_iso_idle (.iso_en, .d(d_idle), .q(idle_iso));

endmodule
