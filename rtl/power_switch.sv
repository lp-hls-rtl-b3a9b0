// Behavioural model of the header power switch of a switchable domain.
//
// The real part is an array of header transistors between the global and the
// domain supply, inserted during physical implementation; it has no logic
// function. This model turns the switch enable into a "domain supplied" flag
// for simulation: vdd drops in the same clock as pse falls and returns
// RAMP_CYCLES clocks after pse rises (0 = at once), standing for the time the
// rail needs to charge. The ramp length is this design's assumption.
// Interface: clk, rst_n (reset = supplied), pse in, vdd out.
module power_switch #(
  parameter int unsigned RAMP_CYCLES = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pse,
  output logic vdd
);

  int cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= int'(RAMP_CYCLES);
    else if (!pse) cnt <= 0;
    else if (cnt < int'(RAMP_CYCLES)) cnt <= cnt + 1;
  end

  assign vdd = pse && (cnt >= int'(RAMP_CYCLES));

endmodule
