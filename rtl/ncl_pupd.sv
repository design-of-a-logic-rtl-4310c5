// ncl_pupd: pull-up/pull-down function of the logic element.
//
// In the transistor circuit an NMOS device controlled by the LUT output F
// pulls the gate node to 0, and a series stack of PMOS devices controlled by
// A, B, C and D pulls it to 1 only when all four inputs are 0.  Otherwise the
// node floats and the hysteresis loop keeps the gate's value.  Here the two
// conducting paths are reported as separate signals: pull_dn = F and
// pull_up = no input asserted.  Because address 0 of the LUT is always 0,
// both can never be active together for a programmed element; if they were,
// the NMOS path is treated as winning (see ncl_reset_logic).
module ncl_pupd (
  input  logic F,        // LUT output (set condition met)
  input  logic A,
  input  logic B,
  input  logic C,
  input  logic D,
  output logic pull_dn,  // node driven to 0 (gate sets)
  output logic pull_up   // node driven to 1 (gate clears)
);

  assign pull_dn = F;
  assign pull_up = ~(A | B | C | D);

endmodule
