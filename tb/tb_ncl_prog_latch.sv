// tb_ncl_prog_latch: the configuration latch follows D while P = 1 and
// keeps its value, whatever D does, once P = 0; nZ is always ~Z.
module tb_ncl_prog_latch;
  logic P, D, Z, nZ;
  int checks = 0, failures = 0;

  ncl_prog_latch dut (.P(P), .D(D), .Z(Z), .nZ(nZ));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (P=%0b D=%0b Z=%0b nZ=%0b)", what, P, D, Z, nZ);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic held;
    for (int r = 0; r < 200; r++) begin
      P = 1'b1;
      D = 1'($urandom);
      #1 check(Z == D, "transparent while programming");
      check(nZ == ~Z, "complement output");
      D = ~D;
      #1 check(Z == D, "follows D while programming");
      held = D;
      P = 1'b0;
      #1;
      for (int k = 0; k < 4; k++) begin
        D = 1'($urandom);
        #1 check(Z == held, "holds after programming");
        check(nZ == ~held, "complement holds");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
