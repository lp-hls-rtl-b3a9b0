// Coarse-grain clock gate for a power-switchable domain.
//
// Latch-based integrated clock gate: the enable is captured by a latch that is
// transparent while clk is low, and the gated clock is clk AND the latched
// enable. A change of en during the high phase therefore only takes effect at
// the next rising edge, so gclk never carries a shortened pulse. The cell type
// is this design's choice; the structure it serves (a clock gate driven by the
// same signal that triggers power gating) follows the power shut-off scheme.
// Interface: clk in, en in (1 = clock runs), gclk out. No reset is needed.
// The latch is intended.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;

endmodule
