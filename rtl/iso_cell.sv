// Isolation cells for the outputs of a power-switchable domain.
//
// While iso_en is high every bit of q is held at the CLAMP value, so a
// powered-down domain cannot drive floating values into the always-on logic;
// otherwise q = d. Purely combinational. The clamp-to-zero default is this
// design's choice. Interface: iso_en, d[W], q[W].
module iso_cell #(
  parameter int unsigned W     = 1,
  parameter logic        CLAMP = 1'b0
) (
  input  logic         iso_en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  assign q = iso_en ? {W{CLAMP}} : d;

endmodule
