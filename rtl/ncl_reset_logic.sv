// ncl_reset_logic: reset value latch and reset multiplexer of the logic
// element.
//
// A programmable latch stores Rv while P is asserted.  rst selects what
// drives the gate node: with rst = 0 the pull-up/pull-down function does
// (and the node may float), with rst = 1 the stored reset value does, so the
// gate value becomes Rv for as long as rst is held.  In the circuit the
// multiplexer passes the complement of Rv to an inverter; this model gives
// the value after that inversion directly.
//
// Outputs: drv = 1 when the node is driven at all, drv_val = the gate value
// it is driven to.  With rst = 0, drv_val is 1 when the NMOS path (LUT output
// F) conducts and 0 when only the PMOS stack conducts.  Everything is
// combinational apart from the Rv latch.
module ncl_reset_logic (
  input  logic P,        // programming mode: 1 = load Rv
  input  logic Rv,       // reset value to store
  input  logic rst,      // 1 = force the gate to the stored reset value
  input  logic pull_dn,  // from the PUPD function: set the gate
  input  logic pull_up,  // from the PUPD function: clear the gate
  output logic drv,      // gate node is driven
  output logic drv_val   // gate value the node is driven to
);

  logic rv_q, rv_n_unused;

  ncl_prog_latch u_rv_latch (
    .P (P),
    .D (Rv),
    .Z (rv_q),
    .nZ(rv_n_unused)
  );

  always_comb begin
    if (rst) begin
      drv     = 1'b1;
      drv_val = rv_q;
    end else begin
      drv     = pull_dn | pull_up;
      drv_val = pull_dn;
    end
  end

endmodule
