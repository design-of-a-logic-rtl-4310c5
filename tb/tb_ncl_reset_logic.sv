// tb_ncl_reset_logic: for both programmed reset values, checks every
// combination of rst and the two pull paths: with rst = 1 the node is driven
// to the stored Rv; with rst = 0 it is driven to 1 by the set path, to 0 by
// the clear path and not at all otherwise.  Rv must not follow its input
// after programming.
module tb_ncl_reset_logic;
  logic P, Rv, rst, pull_dn, pull_up, drv, drv_val;
  int checks = 0, failures = 0;

  ncl_reset_logic dut (.P(P), .Rv(Rv), .rst(rst), .pull_dn(pull_dn),
                       .pull_up(pull_up), .drv(drv), .drv_val(drv_val));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (rst=%0b dn=%0b up=%0b drv=%0b val=%0b)",
               what, rst, pull_dn, pull_up, drv, drv_val);
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
    for (int rv = 0; rv < 2; rv++) begin
      rst = 1'b0; pull_dn = 1'b0; pull_up = 1'b0;
      P = 1'b1; Rv = 1'(rv);
      #1 P = 1'b0;
      #1 Rv = ~Rv;  // ignored after programming
      for (int v = 0; v < 8; v++) begin
        {rst, pull_dn, pull_up} = 3'(v);
        #1;
        if (rst) begin
          check(drv == 1'b1, "reset drives the node");
          check(drv_val == 1'(rv), "reset value");
        end else if (pull_dn) begin
          check(drv && drv_val, "set path");
        end else if (pull_up) begin
          check(drv && !drv_val, "clear path");
        end else begin
          check(!drv, "node floats");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
