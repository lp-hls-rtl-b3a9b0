// Power management block (PMB) for one power-switchable domain.
//
// A small sequencer in the always-on domain that turns a power-control flag
// (pwr_ctrl = 1: the domain may be shut off) into the isolation, retention,
// power-switch and clock-gating controls, in the order the shut-off protocol
// requires:
//   power down : iso_en on -> (1 clk) ret_en on -> (1 clk) pse off and clock gated
//   power up   : pse on and clock released -> (1 + RAMP_CYCLES clk) ret_en off
//                -> (1 clk) iso_en off
// With RAMP_CYCLES = 0 a shut-off followed by a wake-up spends four clock
// cycles in transition states (two down, two up). RAMP_CYCLES adds clocks for
// the supply rails to settle; that number is this design's parameter.
//
// pse follows the convention that 1 means the header switch is on (domain
// supplied). Once started, a sequence always runs to completion; the flag is
// sampled only in ACTIVE and OFF. Reset puts the domain in ACTIVE. All control
// outputs are registered, so they change one clock after the state decision and
// never glitch. active = 1 when the domain is usable.
module pmb
  import lp_pkg::*;
#(
  parameter int unsigned RAMP_CYCLES = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pwr_ctrl,
  output logic       iso_en,
  output logic       ret_en,
  output logic       pse,
  output logic       clk_gate,
  output logic       active,
  output pmb_state_e state
);

  localparam int unsigned RW = (RAMP_CYCLES > 0) ? $clog2(RAMP_CYCLES + 1) : 1;

  pmb_state_e       state_n;
  logic [RW-1:0]    ramp_cnt, ramp_cnt_n;

  always_comb begin
    state_n    = state;
    ramp_cnt_n = ramp_cnt;
    unique case (state)
      PMB_ACTIVE:  if (pwr_ctrl) state_n = PMB_DN_ISO;
      PMB_DN_ISO:  state_n = PMB_DN_RET;
      PMB_DN_RET:  state_n = PMB_OFF;
      PMB_OFF:     if (!pwr_ctrl) begin
                     state_n    = PMB_UP_PWR;
                     ramp_cnt_n = '0;
                   end
      PMB_UP_PWR:  if (RW'(RAMP_CYCLES) == ramp_cnt) state_n = PMB_UP_RET;
                   else ramp_cnt_n = ramp_cnt + 1'b1;
      PMB_UP_RET:  state_n = PMB_ACTIVE;
      default:     state_n = PMB_ACTIVE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= PMB_ACTIVE;
      ramp_cnt <= '0;
      iso_en   <= 1'b0;
      ret_en   <= 1'b0;
      pse      <= 1'b1;
      clk_gate <= 1'b0;
    end else begin
      state    <= state_n;
      ramp_cnt <= ramp_cnt_n;
      iso_en   <= (state_n != PMB_ACTIVE);
      ret_en   <= (state_n == PMB_DN_RET) || (state_n == PMB_OFF) || (state_n == PMB_UP_PWR);
      pse      <= (state_n != PMB_OFF);
      clk_gate <= (state_n == PMB_OFF);
    end
  end

  assign active = (state == PMB_ACTIVE);

  // Protocol rules: the supply is never off unless retention and isolation are on,
  // and retention is never on without isolation.
  a_off_isolated : assert property (@(posedge clk) disable iff (!rst_n) !pse |-> (iso_en && ret_en));
  a_ret_isolated : assert property (@(posedge clk) disable iff (!rst_n) ret_en |-> iso_en);

endmodule
