// tb_ncl_lut16: loads random 14-bit words (and each gate's word) into the
// table, reads all 16 addresses and checks them against the word, with
// address 0 reading 0 and address 15 reading 1; then changes Dp with P = 0
// and checks that the contents do not change.
module tb_ncl_lut16;
  import ncl_le_pkg::*;

  logic       P;
  dp_t        Dp;
  logic [3:0] S;
  logic       F;
  int checks = 0, failures = 0;

  ncl_lut16 dut (.P(P), .Dp(Dp), .S(S), .F(F));

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

  task automatic load_and_read(dp_t w);
    logic expect_bit;
    S  = 4'd0;
    P  = 1'b1;
    Dp = w;
    #1 P = 1'b0;
    #1 Dp = dp_t'($urandom);   // must be ignored from now on
    for (int a = 0; a < 16; a++) begin
      S = 4'(a);
      #1;
      if (a == 0)       expect_bit = 1'b0;
      else if (a == 15) expect_bit = 1'b1;
      else              expect_bit = w[a];
      check(F == expect_bit,
            $sformatf("word %014b address %0d: F=%0b", w, a, F));
    end
  endtask

  initial begin
    for (int gi = 0; gi < int'(NUM_GATES); gi++)
      load_and_read(gate_dp(ncl_gate_e'(gi)));
    for (int r = 0; r < 100; r++)
      load_and_read(dp_t'($urandom));
    load_and_read('1);
    load_and_read('0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
