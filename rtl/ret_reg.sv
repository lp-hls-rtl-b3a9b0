// Behavioural model of a state-retention register (W bits) in a
// power-switchable domain.
//
// In silicon this is a retention flip-flop from the cell library, inserted by
// the back-end flow from the power intent; this model gives its behaviour for
// RTL simulation. The main register q runs on the domain clock (clk). The
// shadow is a latch in the always-on supply, transparent while ret_en is low,
// so it freezes the value q has when ret_en rises and holds it while ret_en
// is high (the latch is intended).
// Loss of supply: a flag, kept in the always-on supply, is set on every
// aon_clk edge with vdd low and cleared on the first one with vdd high. At the
// first domain clock after the supply returns the main register is either
// restored from the shadow (ret_en high) or, with the flag still set, loaded
// with the inverse of the shadow, so any missing restore is visible. After
// that, with ret_en high the register keeps being forced to the shadow value;
// with ret_en low it loads d when en is high. Reset clears everything.
// clk must be aon_clk gated, so the edges of the two coincide.
module ret_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         aon_clk,
  input  logic         rst_n,
  input  logic         vdd,
  input  logic         ret_en,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] shadow;
  logic         lost;

  // balloon latch in the always-on supply: transparent while ret_en is low
  always_latch begin
    if (!ret_en) shadow = q;
  end

  always_ff @(posedge aon_clk or negedge rst_n) begin
    if (!rst_n) lost <= 1'b0;
    else        lost <= !vdd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (ret_en)  q <= shadow;
    else if (lost)    q <= ~shadow;
    else if (en)      q <= d;
  end

endmodule
