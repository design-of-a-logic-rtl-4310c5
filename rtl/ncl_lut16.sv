// ncl_lut16: 16-address lookup table of the logic element.
//
// Fourteen programmable latches hold addresses 14..1, loaded from Dp(14:1)
// while P is asserted.  Address 0 is always 0 and address 15 always 1, since
// every NCL gate is cleared with all inputs at 0 and set with all inputs at
// 1.  The select inputs form the address {S3, S2, S1, S0}; the logic element
// connects A to S3, B to S2, C to S1 and D to S0.  As in the pass-transistor
// tree, the selection reads the latches' complemented outputs and inverts the
// selected one, so F is the stored value of the addressed location.  The
// read path is purely combinational; the table can be read in programming
// mode, where it shows the value being written.
module ncl_lut16
  import ncl_le_pkg::*;
(
  input  logic       P,    // programming mode
  input  dp_t        Dp,   // Dp(14:1), value of addresses 14..1
  input  logic [3:0] S,    // address, S[3] = A ... S[0] = D
  output logic       F     // table output
);

  dp_t  ncell;  // complemented contents of addresses 14..1
  logic nsel;   // complemented output of the selection tree

  for (genvar i = 1; i <= int'(DP_BITS); i++) begin : g_cell
    logic z_unused;
    ncl_prog_latch u_latch (
      .P (P),
      .D (Dp[i]),
      .Z (z_unused),
      .nZ(ncell[i])
    );
  end

  // address 0 holds 0 and address 15 holds 1 (complemented: 1 and 0)
  always_comb begin
    unique case (S)
      4'd0:    nsel = 1'b1;
      4'd15:   nsel = 1'b0;
      default: nsel = ncell[S];
    endcase
  end

  assign F = ~nsel;

endmodule
