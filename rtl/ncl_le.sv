// ncl_le: reconfigurable NULL Convention Logic (NCL) logic element.
//
// The element can be programmed as any of the 27 fundamental NCL threshold
// gates, optionally resettable and optionally inverting.  An NCL gate sets
// its output when its set condition over the inputs is met and, because of
// hysteresis, keeps it set until every input has returned to 0.
//
// Structure (all asynchronous, no clock):
//   * reconfigurable logic: a 16-address LUT (ncl_lut16) addressed by
//     {A,B,C,D} gives F, the set condition; the pull-up/pull-down function
//     (ncl_pupd) drives the gate node to "set" when F = 1 and to "clear" when
//     A = B = C = D = 0, and leaves it floating otherwise;
//   * reset logic (ncl_reset_logic): while rst = 1 the node is driven to the
//     stored reset value Rv instead;
//   * hysteresis logic (ncl_hysteresis): holds the gate value while the node
//     floats;
//   * output inversion logic (ncl_output_inv): Z is the gate value or, if
//     Inv was programmed to 1, its complement.
// Resulting behaviour with rst = 0:  y <= F(A,B,C,D) ? 1 : (A|B|C|D) ? y : 0,
// and Z = y ^ Inv.
//
// Programming: hold P = 1 while Rv, Inv and Dp(14:1) are valid, then drop P;
// the values are kept in level-sensitive latches.  Dp(i) is the LUT entry for
// address i = {A,B,C,D} (A most significant); ncl_le_pkg::gate_dp() gives the
// word for each gate.  Inputs a gate does not use must be tied to 0.
// The gate value reacts to inputs in programming mode too; use it only after
// P is dropped.  The reset value is applied to the gate value ahead of the
// output inversion, as in the element's circuit, so an inverting element
// resets Z to the complement of Rv.  Timing is zero-delay; the circuit's
// transistor-level delays are not modelled.
module ncl_le
  import ncl_le_pkg::*;
(
  input  logic P,    // 1 = programming mode
  input  logic Rv,   // reset value (programmed)
  input  logic Inv,  // output inversion (programmed)
  input  dp_t  Dp,   // LUT contents for addresses 14..1 (programmed)
  input  logic A,    // gate inputs; A is the weighted input of weighted gates
  input  logic B,
  input  logic C,
  input  logic D,
  input  logic rst,  // 1 = reset the gate to Rv
  output logic Z     // gate output
);

  logic F;
  logic pull_dn, pull_up;
  logic drv, drv_val;
  logic y, ny;

  ncl_lut16 u_lut (
    .P (P),
    .Dp(Dp),
    .S ({A, B, C, D}),
    .F (F)
  );

  ncl_pupd u_pupd (
    .F      (F),
    .A      (A),
    .B      (B),
    .C      (C),
    .D      (D),
    .pull_dn(pull_dn),
    .pull_up(pull_up)
  );

  ncl_reset_logic u_reset (
    .P      (P),
    .Rv     (Rv),
    .rst    (rst),
    .pull_dn(pull_dn),
    .pull_up(pull_up),
    .drv    (drv),
    .drv_val(drv_val)
  );

  ncl_hysteresis u_hyst (
    .drv    (drv),
    .drv_val(drv_val),
    .y      (y),
    .ny     (ny)
  );

  ncl_output_inv u_outinv (
    .P  (P),
    .Inv(Inv),
    .y  (y),
    .ny (ny),
    .Z  (Z)
  );

  // The LUT's fixed address 0 guarantees that the set path and the clear
  // path of the pull-up/pull-down function never conduct together.  The
  // check is deferred so that it sees settled values only.
  always_comb begin
    assert final (!(pull_dn && pull_up))
      else $error("ncl_le: pull-up and pull-down paths both conduct");
  end

endmodule
