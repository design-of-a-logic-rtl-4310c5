// tb_ncl_embedded_reg: embedded registration for every gate of three or
// fewer inputs.
//
// An NCL register stage after a gate g is a TH22n gate combining g's output
// with the request line Ki from the next stage.  With embedded registration
// the two are merged into one element whose first input (weighted) is Ki and
// whose other inputs are g's inputs: Ki AND set_g(inputs).  For the seven 2-
// and 3-input gates and the 1-input buffer the merged gates are
//   buffer -> TH22     TH12 -> TH33w2    TH22 -> TH33      TH13   -> TH44w3
//   TH23   -> TH44w2   TH33 -> TH44      TH23w2 -> TH54w32 TH33w2 -> TH54w22
// all of them fundamental gates, so one element holds each.
//
// For each pair the testbench builds both versions from logic elements
// (gate element + TH22n register element, and the single merged element)
// and drives them with the same NCL four-phase sequences: input rails
// asserted one at a time, Ki lowered once the output is DATA (or once the
// inputs have returned to NULL, so the register has to hold), inputs
// returned to NULL one at a time, Ki raised again, sometimes with the next
// DATA already waiting.  The two outputs must agree after every change.
module tb_ncl_embedded_reg;
  import ncl_le_pkg::*;

  localparam int NPAIRS = 8;
  // base gate (the buffer is TH12 with its second input tied to 0)
  localparam ncl_gate_e BASE   [NPAIRS] = '{TH12, TH12, TH22, TH13, TH23, TH33, TH23W2, TH33W2};
  localparam int        BASE_N [NPAIRS] = '{1, 2, 2, 3, 3, 3, 3, 3};
  localparam ncl_gate_e MERGED [NPAIRS] = '{TH22, TH33W2, TH33, TH44W3, TH44W2, TH44, TH54W32, TH54W22};

  logic P, rst, Ki;
  logic [2:0] x;            // gate inputs A, B, C of the base gate
  dp_t  dp_base, dp_merged;
  wire  g, z_two, z_merged;
  int checks = 0, failures = 0;
  int n_hold = 0, n_block = 0, n_data = 0;

  ncl_le u_base (.P(P), .Rv(1'b0), .Inv(1'b0), .Dp(dp_base),
                 .A(x[2]), .B(x[1]), .C(x[0]), .D(1'b0), .rst(1'b0), .Z(g));
  ncl_le u_reg (.P(P), .Rv(1'b0), .Inv(1'b0), .Dp(gate_dp(TH22)),
                .A(g), .B(Ki), .C(1'b0), .D(1'b0), .rst(rst), .Z(z_two));
  ncl_le u_merged (.P(P), .Rv(1'b0), .Inv(1'b0), .Dp(dp_merged),
                   .A(Ki), .B(x[2]), .C(x[1]), .D(x[0]), .rst(rst), .Z(z_merged));

  task automatic compare(string what);
    checks++;
    if (z_two !== z_merged) begin
      failures++;
      $display("FAIL @%0t: %s: x=%b Ki=%b two-stage=%b merged=%b",
               $time, what, x, Ki, z_two, z_merged);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // raise (up = 1) or lower the rails in 'pattern' one at a time, random order
  task automatic walk(logic [2:0] pattern, logic up, string what);
    int order [3] = '{0, 1, 2};
    order.shuffle();
    foreach (order[k]) begin
      if (pattern[order[k]]) begin
        x[order[k]] = up;
        #1ns compare(what);
      end
    end
  endtask

  initial begin
    logic [2:0] mask, pat;
    x = '0; Ki = 1'b1; rst = 1'b0;
    for (int p = 0; p < NPAIRS; p++) begin
      mask = 3'b111 << (3 - BASE_N[p]);
      P = 1'b1;
      dp_base = gate_dp(BASE[p]);
      dp_merged = gate_dp(MERGED[p]);
      x = '0; Ki = 1'b1; rst = 1'b1;
      #5ns P = 1'b0;
      #1ns rst = 1'b0;
      #1ns compare($sformatf("%s reset", BASE[p].name()));
      for (int r = 0; r < 200; r++) begin
        pat = 3'($urandom) & mask;
        if ($urandom_range(2) == 0) pat = mask;
        walk(pat, 1'b1, $sformatf("%s DATA", BASE[p].name()));
        if (z_merged) n_data++;
        if ($urandom_range(1) == 0) begin
          // inputs return to NULL first: the register has to hold
          walk(pat, 1'b0, $sformatf("%s NULL before Ki", BASE[p].name()));
          if (z_merged) n_hold++;
          Ki = 1'b0;
          #1ns compare("Ki lowered");
        end else begin
          Ki = 1'b0;
          #1ns compare("Ki lowered");
          walk(pat, 1'b0, $sformatf("%s NULL", BASE[p].name()));
        end
        if ($urandom_range(1) == 0) begin
          // next DATA arrives before Ki rises: the register must block it
          pat = mask;
          walk(pat, 1'b1, $sformatf("%s DATA while Ki low", BASE[p].name()));
          n_block++;
          Ki = 1'b1;
          #1ns compare("Ki raised with DATA waiting");
          Ki = 1'b0;
          #1ns compare("Ki lowered");
          walk(pat, 1'b0, "NULL");
        end
        Ki = 1'b1;
        #1ns compare("Ki raised");
      end
    end
    checks += 3;
    if (n_data == 0)  begin failures++; $display("FAIL: no DATA wavefront passed"); end
    if (n_hold == 0)  begin failures++; $display("FAIL: register hold never exercised"); end
    if (n_block == 0) begin failures++; $display("FAIL: register blocking never exercised"); end
    $display("data=%0d holds=%0d blocks=%0d", n_data, n_hold, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
