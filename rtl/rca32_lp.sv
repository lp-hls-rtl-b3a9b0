// 32-bit ripple-carry adder with a power-gated upper half.
//
// The adder is split into two 16-bit ripple-carry adders. The low half
// (bits 0-15) is always on. The high half (bits 16-31) sits in a switchable
// power domain controlled by a PMB, so the adder can run as a 16-bit adder
// with the upper half shut off. p_shutoff = 1 requests 16-bit operation: the
// PMB isolates the upper adder, engages retention, opens the power switch.
// Two output multiplexers, selected by p_shutoff, pick the valid results:
//   p_shutoff = 0 : s_out = {msb sum, lsb sum}, c_out = msb carry
//   p_shutoff = 1 : s_out = {isolated msb sum (0), lsb sum}, c_out = lsb carry
// The datapath is combinational; only the PMB is clocked. After p_shutoff
// falls, the upper half needs the power-up sequence (two clocks plus
// RAMP_CYCLES) before 32-bit results are valid; msb_ready reports that. The
// split, the PMB and the p_shutoff-driven multiplexers follow the source
// design; msb_ready, the clamp-to-zero isolation and the RAMP_CYCLES knob are
// this design's choices. The upper adder has no state, so its retention
// control is unused here.
module rca32_lp #(
  parameter int unsigned RAMP_CYCLES = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  input  logic        p_shutoff,
  output logic [31:0] s_out,
  output logic        c_out,
  output logic        msb_ready,
  output logic        msb_vdd
);

  logic [15:0] lsb_s, msb_s, msb_s_iso;
  logic        lsb_c, msb_c, msb_c_iso;
  logic        iso_en, ret_en, pse, clk_gate;
  lp_pkg::pmb_state_e pmb_state;

  pmb #(.RAMP_CYCLES(RAMP_CYCLES)) u_pmb (
    .clk, .rst_n, .pwr_ctrl(p_shutoff),
    .iso_en, .ret_en, .pse, .clk_gate, .active(msb_ready), .state(pmb_state)
  );

  power_switch #(.RAMP_CYCLES(RAMP_CYCLES)) u_psw (.clk, .rst_n, .pse, .vdd(msb_vdd));

  rca16 #(.W(16)) u_lsb_rca (.a(a[15:0]),  .b(b[15:0]),  .cin(cin),   .s(lsb_s), .cout(lsb_c));

  // switchable domain
  rca16 #(.W(16)) u_msb_rca (.a(a[31:16]), .b(b[31:16]), .cin(lsb_c), .s(msb_s), .cout(msb_c));

  iso_cell #(.W(17)) u_iso (.iso_en, .d({msb_c, msb_s}), .q({msb_c_iso, msb_s_iso}));

  assign s_out = p_shutoff ? {16'h0000, lsb_s} : {msb_s_iso, lsb_s};
  assign c_out = p_shutoff ? lsb_c : msb_c_iso;

endmodule
