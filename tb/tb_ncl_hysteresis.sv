// tb_ncl_hysteresis: random sequences of drive/value pairs; the loop's value
// must follow the driven value and keep the last one while undriven.
module tb_ncl_hysteresis;
  logic drv, drv_val, y, ny;
  logic expect_y;
  int checks = 0, failures = 0;

  ncl_hysteresis dut (.drv(drv), .drv_val(drv_val), .y(y), .ny(ny));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int holds;
    holds = 0;
    drv = 1'b1; drv_val = 1'b0; expect_y = 1'b0;
    for (int r = 0; r < 500; r++) begin
      drv     = 1'($urandom);
      drv_val = 1'($urandom);
      if (drv) expect_y = drv_val;
      else     holds++;
      #1;
      checks++;
      if (y != expect_y || ny != ~expect_y) begin
        failures++;
        $display("FAIL: step %0d drv=%0b val=%0b y=%0b ny=%0b", r, drv, drv_val, y, ny);
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
