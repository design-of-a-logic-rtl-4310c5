// tb_ncl_and: the dual-rail input-complete NCL AND function, built from two
// logic elements:
//   F^1 = TH22  (A^1, B^1)
//   F^0 = THand0(A = B^0, B = A^0, C = B^1, D = A^1)  = A^0B^0 + A^0B^1 + A^1B^0
// For every pair of operands the four rails are raised and lowered one at a
// time in random orders.  The output must stay NULL until both operands are
// DATA (input completeness), then show a AND b, and must stay DATA until
// every input rail has returned to 0.
module tb_ncl_and;
  import ncl_le_pkg::*;

  logic P;
  logic [1:0] a, b, f;  // dual rail, [1] = rail 1
  int checks = 0, failures = 0;

  ncl_le u_f1 (.P(P), .Rv(1'b0), .Inv(1'b0), .Dp(gate_dp(TH22)),
               .A(a[1]), .B(b[1]), .C(1'b0), .D(1'b0), .rst(1'b0), .Z(f[1]));
  ncl_le u_f0 (.P(P), .Rv(1'b0), .Inv(1'b0), .Dp(gate_dp(THAND0)),
               .A(b[0]), .B(a[0]), .C(b[1]), .D(a[1]), .rst(1'b0), .Z(f[0]));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (a=%b b=%b f=%b)", $time, what, a, b, f);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic x, y;
    int order [2];
    a = '0; b = '0;
    P = 1'b1;
    #5ns P = 1'b0;
    #1ns check(f == 2'b00, "NULL after programming");
    for (int r = 0; r < 200; r++) begin
      x = (r < 4) ? r[1] : 1'($urandom);
      y = (r < 4) ? r[0] : 1'($urandom);
      order = '{0, 1};
      order.shuffle();
      foreach (order[k]) begin
        if (order[k] == 0) a = x ? 2'b10 : 2'b01;
        else               b = y ? 2'b10 : 2'b01;
        #1ns;
        if (k == 0) check(f == 2'b00, "output waits for both operands");
      end
      check(f == ((x & y) ? 2'b10 : 2'b01), $sformatf("%0b AND %0b", x, y));
      order.shuffle();
      foreach (order[k]) begin
        if (order[k] == 0) a = 2'b00;
        else               b = 2'b00;
        #1ns;
        if (k == 0) check(f == ((x & y) ? 2'b10 : 2'b01), "DATA held until all inputs NULL");
      end
      check(f == 2'b00, "returns to NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
