// ncl_prog_latch: one configuration latch of the logic element.
//
// While the programming signal P is asserted the latch is transparent and Z
// follows D; when P is deasserted it keeps the last value.  Z and its
// complement nZ are both available, as in the transistor-level cell (a
// transmission gate driven by P/nP feeding a cross-coupled inverter pair).
// The complementary programming input nP of the cell is derived inside from
// P.  The cell is level-sensitive and has no clock; it is meant to be loaded
// once, before the element is used.
module ncl_prog_latch (
  input  logic P,   // programming mode: 1 = load D
  input  logic D,   // value to store
  output logic Z,   // stored value
  output logic nZ   // complement of the stored value
);

  logic q;

  always_latch begin
    if (P) q = D;
  end

  assign Z  = q;
  assign nZ = ~q;

endmodule
