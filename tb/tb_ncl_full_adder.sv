// tb_ncl_full_adder: a dual-rail NCL full adder with its output register,
// built from eight logic elements, using embedded registration.
//
// Mapping (each line is one element):
//   Co^0 = TH44w2n(Ki2; X^0, Y^0, Ci^0)    carry with embedded register
//   Co^1 = TH44w2n(Ki2; X^1, Y^1, Ci^1)    (weight 2 on Ki2, reset to 0)
//   s^0  = TH34w2 (Co^1; X^0, Y^0, Ci^0)   sum, weight 2 on the carry
//   s^1  = TH34w2 (Co^0; X^1, Y^1, Ci^1)
//   S^0  = TH22n  (s^0, Ki1)               sum register, reset to 0
//   S^1  = TH22n  (s^1, Ki1)
//   Ko1  = inverting TH12(S^0, S^1)        completion of the sum register
//   Ko2  = inverting TH12(Co^0, Co^1)      completion of the carry register
// The TH44w2 gate sets when Ki2 and at least two of the three inputs of its
// rail are asserted, i.e. it is a TH23 majority gate merged with a TH22
// register stage.
//
// The testbench plays the stages before and after the adder with the
// four-phase NCL handshake: DATA in, wait for DATA out, lower Ki (request for
// NULL), NULL in, wait for NULL out, raise Ki (request for data).  Every
// input combination is checked against x + y + ci in several arrival orders.
// It also checks that the register keeps DATA while Ki stays high and the
// inputs return to NULL, that it blocks new DATA while Ki is low, that no
// output pair ever has both rails high, and that reset clears the register.
module tb_ncl_full_adder;
  import ncl_le_pkg::*;

  localparam int NLE = 8;
  localparam ncl_gate_e GATE [NLE] = '{TH44W2, TH44W2, TH34W2, TH34W2,
                                       TH22, TH22, TH12, TH12};
  localparam logic INV [NLE] = '{0, 0, 0, 0, 0, 0, 1, 1};

  logic P, rst;
  logic [1:0] X, Y, Ci;   // dual rail, [1] = rail 1, [0] = rail 0
  logic Ki1, Ki2;
  logic [1:0] Co, s, S;
  logic Ko1, Ko2;
  wire  [3:0] in  [NLE];
  wire        out [NLE];
  int checks = 0, failures = 0;
  int n_hold = 0, n_block = 0, n_ops = 0, n_reset = 0;

  assign in[0] = {Ki2, X[0], Y[0], Ci[0]};
  assign in[1] = {Ki2, X[1], Y[1], Ci[1]};
  assign in[2] = {Co[1], X[0], Y[0], Ci[0]};
  assign in[3] = {Co[0], X[1], Y[1], Ci[1]};
  assign in[4] = {s[0], Ki1, 2'b00};
  assign in[5] = {s[1], Ki1, 2'b00};
  assign in[6] = {S[0], S[1], 2'b00};
  assign in[7] = {Co[0], Co[1], 2'b00};
  assign Co  = {out[1], out[0]};
  assign s   = {out[3], out[2]};
  assign S   = {out[5], out[4]};
  assign Ko1 = out[6];
  assign Ko2 = out[7];

  for (genvar i = 0; i < NLE; i++) begin : g_le
    ncl_le u_le (
      .P  (P),
      .Rv (1'b0),
      .Inv(INV[i]),
      .Dp (gate_dp(GATE[i])),
      .A  (in[i][3]), .B(in[i][2]), .C(in[i][1]), .D(in[i][0]),
      .rst(rst && (i == 0 || i == 1 || i == 4 || i == 5)),
      .Z  (out[i])
    );
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (X=%b Y=%b Ci=%b Ki=%b%b Co=%b S=%b Ko=%b%b)",
               $time, what, X, Y, Ci, Ki1, Ki2, Co, S, Ko1, Ko2);
    end
  endtask

  // an output pair with both rails high is never legal
  always @(Co or S) begin
    if (!P) begin
      checks++;
      if (Co == 2'b11 || S == 2'b11) begin
        failures++;
        $display("FAIL @%0t: illegal dual-rail output Co=%b S=%b", $time, Co, S);
      end
    end
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] dr(logic b);
    return b ? 2'b10 : 2'b01;
  endfunction

  // apply DATA to the three inputs one at a time in a random order
  task automatic apply_data(logic x, logic y, logic ci);
    int order [3] = '{0, 1, 2};
    order.shuffle();
    foreach (order[k]) begin
      case (order[k])
        0: X  = dr(x);
        1: Y  = dr(y);
        default: Ci = dr(ci);
      endcase
      #1ns;
    end
  endtask

  task automatic apply_null();
    int order [3] = '{0, 1, 2};
    order.shuffle();
    foreach (order[k]) begin
      case (order[k])
        0: X  = 2'b00;
        1: Y  = 2'b00;
        default: Ci = 2'b00;
      endcase
      #1ns;
    end
  endtask

  task automatic operation(logic x, logic y, logic ci);
    logic [1:0] sum;
    sum = 2'(x) + 2'(y) + 2'(ci);
    apply_data(x, y, ci);
    check(S == dr(sum[0]), $sformatf("sum of %0b+%0b+%0b", x, y, ci));
    check(Co == dr(sum[1]), $sformatf("carry of %0b+%0b+%0b", x, y, ci));
    check(!Ko1 && !Ko2, "completion shows DATA");
    // inputs return to NULL while the next stage still requests data:
    // the register must keep the DATA wavefront
    if ($urandom_range(1) == 0) begin
      apply_null();
      check(S == dr(sum[0]) && Co == dr(sum[1]), "register holds DATA");
      n_hold++;
      Ki1 = 1'b0; Ki2 = 1'b0;
      #1ns;
    end else begin
      Ki1 = 1'b0; Ki2 = 1'b0;
      #1ns;
      check(S == dr(sum[0]) && Co == dr(sum[1]), "DATA kept until inputs are NULL");
      apply_null();
    end
    check(S == 2'b00 && Co == 2'b00, "outputs NULL");
    check(Ko1 && Ko2, "completion shows NULL");
    // next DATA may arrive before the next stage requests it: blocked
    if ($urandom_range(1) == 0) begin
      X = dr(x); Y = dr(y); Ci = dr(ci);
      #1ns;
      check(S == 2'b00 && Co == 2'b00, "register blocks DATA while Ki is low");
      n_block++;
      apply_null();
    end
    Ki1 = 1'b1; Ki2 = 1'b1;
    #1ns;
    n_ops++;
  endtask

  initial begin
    logic [2:0] v;
    X = '0; Y = '0; Ci = '0; Ki1 = 1'b1; Ki2 = 1'b1;
    rst = 1'b1;
    P = 1'b1;
    #5ns P = 1'b0;
    #5ns;
    check(S == 2'b00 && Co == 2'b00, "reset to NULL");
    n_reset++;
    rst = 1'b0;
    #1ns;
    for (int r = 0; r < 64; r++) begin
      v = (r < 8) ? 3'(r) : 3'($urandom);
      operation(v[2], v[1], v[0]);
    end
    // reset in the middle of a DATA wavefront clears the register
    apply_data(1'b1, 1'b1, 1'b0);
    Ki1 = 1'b0; Ki2 = 1'b0;
    rst = 1'b1;
    #1ns;
    check(S == 2'b00 && Co == 2'b00, "reset clears a held DATA wavefront");
    n_reset++;
    apply_null();
    rst = 1'b0;
    Ki1 = 1'b1; Ki2 = 1'b1;
    #1ns;
    operation(1'b1, 1'b0, 1'b1);
    checks += 3;
    if (n_hold == 0)  begin failures++; $display("FAIL: hold never exercised"); end
    if (n_block == 0) begin failures++; $display("FAIL: blocking never exercised"); end
    if (n_ops < 8)    begin failures++; $display("FAIL: too few operations"); end
    $display("operations=%0d holds=%0d blocks=%0d resets=%0d", n_ops, n_hold, n_block, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
