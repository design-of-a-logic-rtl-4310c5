// tb_ncl_le_pkg: checks the LUT contents the package computes for the 27
// NCL gates against the threshold/weight reference model, over every input
// pattern the gate can see (unused inputs at 0), plus the fixed addresses 0
// and 15 and the programming words of the element's two worked examples:
// TH44 is all zeros and TH54w32 (AB + ACD) is 11110000000000.
module tb_ncl_le_pkg;
  import ncl_le_pkg::*;
  import ncl_ref_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lut_t t;
    ncl_gate_e g;
    for (int gi = 0; gi < int'(NUM_GATES); gi++) begin
      g = ncl_gate_e'(gi);
      t = lut_table(g);
      check(t[0] == 1'b0, $sformatf("%s address 0", g.name()));
      check(t[15] == 1'b1, $sformatf("%s address 15", g.name()));
      for (int a = 0; a < 16; a++) begin
        if ((4'(a) & ~ref_mask(g)) == 4'b0)
          check(t[a] == ref_set(g, 4'(a)),
                $sformatf("%s address %0d: got %0b", g.name(), a, t[a]));
      end
      check(gate_dp(g) == t[14:1], $sformatf("%s Dp word", g.name()));
      #1;
    end
    check(gate_dp(TH44) == 14'b00000000000000, "TH44 programming word");
    check(gate_dp(TH54W32) == 14'b11110000000000, "TH54w32 programming word");
    // TH23: 1 at addresses 6, 10, 12, 14 among the D = 0 addresses
    t = lut_table(TH23);
    check({t[14], t[12], t[10], t[8], t[6], t[4], t[2], t[0]} == 8'b11101000,
          "TH23 example addresses");
    check(gate_inputs(TH22) == 2 && gate_inputs(TH33W2) == 3 &&
          gate_inputs(TH24COMP) == 4, "gate input counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
