// tb_ncl_pupd: exhaustive check of the pull-up/pull-down function: the
// pull-down (set) path conducts exactly when F = 1, the pull-up (clear) path
// exactly when A = B = C = D = 0.
module tb_ncl_pupd;
  logic F, A, B, C, D, pull_dn, pull_up;
  int checks = 0, failures = 0;

  ncl_pupd dut (.F(F), .A(A), .B(B), .C(C), .D(D),
                .pull_dn(pull_dn), .pull_up(pull_up));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {F, A, B, C, D} = 5'(v);
      #1;
      checks++;
      if (pull_dn != F) begin
        failures++;
        $display("FAIL: pull_dn for %05b", v);
      end
      checks++;
      if (pull_up != (v[3:0] == 0)) begin
        failures++;
        $display("FAIL: pull_up for %05b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
