// ncl_output_inv: output inversion logic of the logic element.
//
// A programmable latch stores Inv while P is asserted.  The stored value
// selects whether Z is the hysteresis loop's value (Inv = 0) or its
// complement (Inv = 1), which lets the element act as an inverting gate such
// as the inverting TH1n gates used in NCL registers.  The selection is
// combinational; only the Inv latch holds state.
module ncl_output_inv (
  input  logic P,    // programming mode: 1 = load Inv
  input  logic Inv,  // 1 = inverting gate
  input  logic y,    // gate value
  input  logic ny,   // complement of the gate value
  output logic Z     // element output
);

  logic inv_q, inv_n_unused;

  ncl_prog_latch u_inv_latch (
    .P (P),
    .D (Inv),
    .Z (inv_q),
    .nZ(inv_n_unused)
  );

  assign Z = inv_q ? ny : y;

endmodule
