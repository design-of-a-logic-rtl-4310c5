// tb_ncl_output_inv: with Inv programmed to 0, Z is the gate value; with Inv
// programmed to 1, Z is its complement.  Inv is ignored after programming.
module tb_ncl_output_inv;
  logic P, Inv, y, ny, Z;
  int checks = 0, failures = 0;

  ncl_output_inv dut (.P(P), .Inv(Inv), .y(y), .ny(ny), .Z(Z));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int inv = 0; inv < 2; inv++) begin
      y = 1'b0; ny = 1'b1;
      P = 1'b1; Inv = 1'(inv);
      #1 P = 1'b0;
      #1 Inv = ~Inv;
      for (int k = 0; k < 20; k++) begin
        y  = 1'($urandom);
        ny = ~y;
        #1;
        checks++;
        if (Z != (inv ? ~y : y)) begin
          failures++;
          $display("FAIL: Inv=%0d y=%0b Z=%0b", inv, y, Z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
