// tb_ncl_le: end-to-end test of the reconfigurable NCL logic element at its
// default configuration.
//
// 1. Replays the two programmed-gate experiments of the element's
//    characterisation, in 5 ns steps: a non-inverting TH44 gate resettable to
//    1 (a 4-input C-element), and a non-inverting TH54w32 gate (AB + ACD)
//    resettable to 0, checking Z after every input change.
// 2. Programs the element in turn as each of the 27 fundamental gates, with
//    every combination of reset value and output inversion, and drives it
//    with random input sequences (inputs the gate does not use held at 0,
//    rst asserted now and then).
// 3. Uses the element as an inverter (TH12 with B tied to 0, output
//    inverted).  Z is compared after every change with a
//    reference that knows each gate only by its threshold and weights:
//    gate value <= rst ? Rv : set ? 1 : all inputs 0 ? 0 : previous value,
//    Z = gate value ^ Inv.
// Each mechanism of the element is counted (set, hold while set, release
// to 0, hold while clear, reset, inverted output, reprogramming) and a
// mechanism that never occurs counts as a failure.
module tb_ncl_le;
  import ncl_le_pkg::*;
  import ncl_ref_pkg::*;

  logic P, Rv, Inv, A, B, C, D, rst, Z;
  dp_t  Dp;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_set, n_hold1, n_clear, n_hold0, n_reset, n_inverted, n_program, n_inverter;

  ncl_le dut (.P(P), .Rv(Rv), .Inv(Inv), .Dp(Dp), .A(A), .B(B), .C(C),
              .D(D), .rst(rst), .Z(Z));

  task automatic check(logic expect_z, string what);
    checks++;
    if (Z !== expect_z) begin
      failures++;
      $display("FAIL @%0t: %s: ABCD=%b rst=%b Z=%b expected %b",
               $time, what, {A, B, C, D}, rst, Z, expect_z);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Programming phase: 5 ns with P = 1 and the gate inputs at 0.
  task automatic program_le(ncl_gate_e g, logic rv, logic inv);
    {A, B, C, D} = 4'b0000;
    rst = 1'b0;
    P   = 1'b1;
    Rv  = rv;
    Inv = inv;
    Dp  = gate_dp(g);
    #5ns;
    P   = 1'b0;
    Rv  = 1'($urandom);   // programming inputs are don't-care afterwards
    Inv = 1'($urandom);
    Dp  = dp_t'($urandom);
    n_program++;
  endtask

  task automatic step(logic [3:0] abcd, logic r, logic expect_z, string what);
    {A, B, C, D} = abcd;
    rst = r;
    #5ns;
    check(expect_z, what);
  endtask

  task automatic fig_th44d();
    program_le(TH44, 1'b1, 1'b0);
    step(4'b0000, 0, 0, "TH44d inputs 0000");
    step(4'b0001, 0, 0, "TH44d D asserted");
    step(4'b0011, 0, 0, "TH44d C asserted");
    step(4'b0111, 0, 0, "TH44d B asserted");
    step(4'b1111, 0, 1, "TH44d all asserted: Z set");
    step(4'b0111, 0, 1, "TH44d A deasserted: hysteresis");
    step(4'b0011, 0, 1, "TH44d B deasserted: hysteresis");
    step(4'b0001, 0, 1, "TH44d C deasserted: hysteresis");
    step(4'b0000, 0, 0, "TH44d all deasserted: Z cleared");
    step(4'b0000, 1, 1, "TH44d rst asserted: Z reset to 1");
    step(4'b0010, 1, 1, "TH44d C asserted during reset");
    step(4'b0010, 0, 1, "TH44d rst released: held by hysteresis");
    step(4'b0000, 0, 0, "TH44d C deasserted: Z cleared");
  endtask

  task automatic fig_th54w32();
    program_le(TH54W32, 1'b0, 1'b0);
    step(4'b1000, 0, 0, "TH54w32 A asserted");
    step(4'b1010, 0, 0, "TH54w32 C asserted");
    step(4'b1011, 0, 1, "TH54w32 D asserted: ACD sets Z");
    step(4'b1001, 0, 1, "TH54w32 C deasserted: hysteresis");
    step(4'b0001, 0, 1, "TH54w32 A deasserted: hysteresis");
    step(4'b0000, 0, 0, "TH54w32 D deasserted: Z cleared");
    step(4'b0100, 0, 0, "TH54w32 B asserted");
    step(4'b1100, 0, 1, "TH54w32 A asserted: AB sets Z");
    step(4'b1000, 0, 1, "TH54w32 B deasserted: hysteresis");
    step(4'b0000, 0, 0, "TH54w32 A deasserted: Z cleared");
    step(4'b0000, 1, 0, "TH54w32 rst asserted: Z reset to 0");
    step(4'b0000, 0, 0, "TH54w32 rst released");
  endtask

  task automatic random_run(ncl_gate_e g, logic rv, logic inv, int steps);
    logic       y;
    logic [3:0] v;
    logic       r, s;
    program_le(g, rv, inv);
    #1ns;
    y = 1'b0;   // inputs are 0 after programming: gate is clear
    check(inv, $sformatf("%s clear after programming", g.name()));
    for (int k = 0; k < steps; k++) begin
      v = 4'($urandom) & ref_mask(g);
      // favour patterns with many inputs asserted so gates with high
      // thresholds set often
      if ($urandom_range(3) == 0) v = ref_mask(g);
      r = ($urandom_range(15) == 0);
      s = ref_set(g, v);
      if (r) begin
        y = rv;
        n_reset++;
      end else if (s) begin
        if (!y) n_set++;
        y = 1'b1;
      end else if (v == 4'b0000) begin
        if (y) n_clear++;
        y = 1'b0;
      end else begin
        if (y) n_hold1++;
        else   n_hold0++;
      end
      if (inv) n_inverted++;
      {A, B, C, D} = v;
      rst = r;
      #1ns;
      check(y ^ inv, $sformatf("%s Rv=%0b Inv=%0b step %0d", g.name(), rv, inv, k));
    end
  endtask

  // TH12 with B tied to 0 and the output inverted is an inverter
  task automatic inverter_run();
    program_le(TH12, 1'b0, 1'b1);
    for (int k = 0; k < 16; k++) begin
      logic a;
      a = 1'($urandom);
      step({a, 3'b000}, 0, ~a, "inverter");
      n_inverter++;
    end
  endtask

  task automatic mechanism(int count, string name);
    $display("  %-28s %0d", name, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    {n_set, n_hold1, n_clear, n_hold0, n_reset, n_inverted, n_program, n_inverter} = '0;
    fig_th44d();
    fig_th54w32();
    inverter_run();
    for (int gi = 0; gi < int'(NUM_GATES); gi++)
      for (int c = 0; c < 4; c++)
        random_run(ncl_gate_e'(gi), c[0], c[1], 300);
    $display("mechanisms exercised:");
    mechanism(n_program,  "programming");
    mechanism(n_set,      "set (0 -> 1)");
    mechanism(n_hold1,    "hysteresis hold at 1");
    mechanism(n_clear,    "release (1 -> 0)");
    mechanism(n_hold0,    "hold at 0 below threshold");
    mechanism(n_reset,    "reset");
    mechanism(n_inverted, "inverted output");
    mechanism(n_inverter, "used as an inverter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
