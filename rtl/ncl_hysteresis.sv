// ncl_hysteresis: the state-holding loop of the logic element.
//
// In the circuit a weak pair of cross-coupled inverters keeps the gate value
// whenever neither the pull-up/pull-down function nor the reset multiplexer
// drives the node.  Modelled as a level-sensitive latch: while drv is 1 the
// value follows drv_val, while drv is 0 it holds.  Both the loop's value y
// and its complement ny are brought out, since the output inversion logic
// picks one of them.  The latch is intentional: it is the hysteresis that
// makes the element an NCL gate.
module ncl_hysteresis (
  input  logic drv,      // node is driven
  input  logic drv_val,  // value it is driven to
  output logic y,        // held gate value
  output logic ny        // its complement
);

  logic q;

  always_latch begin
    if (drv) q = drv_val;
  end

  assign y  = q;
  assign ny = ~q;

endmodule
