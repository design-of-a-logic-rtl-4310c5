// ncl_ref_pkg: reference model used by the testbenches.
//
// Describes every fundamental NCL gate by its threshold m and input weights
// (gate THmnWw1w2.. has threshold m, n inputs and weights w1, w2, .. on
// inputs A, B, ..; other inputs weigh 1), so a gate's set condition is
// "weighted sum of asserted inputs >= m".  The three gates that are not
// threshold functions (THxor0, THand0, TH24comp) are given as hand-derived
// 16-entry truth tables.  This is a second, independent description of the
// gate set, against which the element's LUT contents and behaviour are
// checked.
package ncl_ref_pkg;
  import ncl_le_pkg::*;

  typedef struct {
    int unsigned m;       // threshold (0: not a threshold gate)
    int unsigned n;       // number of inputs
    int unsigned w [4];   // weights of A, B, C, D
    logic [15:0] table16; // truth table when m == 0
  } ref_gate_t;

  function automatic ref_gate_t ref_gate(ncl_gate_e g);
    ref_gate_t r;
    r.w = '{1, 1, 1, 1};
    r.table16 = '0;
    r.m = 0;
    unique case (g)
      TH12:     begin r.m = 1; r.n = 2; end
      TH22:     begin r.m = 2; r.n = 2; end
      TH13:     begin r.m = 1; r.n = 3; end
      TH23:     begin r.m = 2; r.n = 3; end
      TH33:     begin r.m = 3; r.n = 3; end
      TH23W2:   begin r.m = 2; r.n = 3; r.w[0] = 2; end
      TH33W2:   begin r.m = 3; r.n = 3; r.w[0] = 2; end
      TH14:     begin r.m = 1; r.n = 4; end
      TH24:     begin r.m = 2; r.n = 4; end
      TH34:     begin r.m = 3; r.n = 4; end
      TH44:     begin r.m = 4; r.n = 4; end
      TH24W2:   begin r.m = 2; r.n = 4; r.w[0] = 2; end
      TH34W2:   begin r.m = 3; r.n = 4; r.w[0] = 2; end
      TH44W2:   begin r.m = 4; r.n = 4; r.w[0] = 2; end
      TH34W3:   begin r.m = 3; r.n = 4; r.w[0] = 3; end
      TH44W3:   begin r.m = 4; r.n = 4; r.w[0] = 3; end
      TH24W22:  begin r.m = 2; r.n = 4; r.w[0] = 2; r.w[1] = 2; end
      TH34W22:  begin r.m = 3; r.n = 4; r.w[0] = 2; r.w[1] = 2; end
      TH44W22:  begin r.m = 4; r.n = 4; r.w[0] = 2; r.w[1] = 2; end
      TH54W22:  begin r.m = 5; r.n = 4; r.w[0] = 2; r.w[1] = 2; end
      TH34W32:  begin r.m = 3; r.n = 4; r.w[0] = 3; r.w[1] = 2; end
      TH54W32:  begin r.m = 5; r.n = 4; r.w[0] = 3; r.w[1] = 2; end
      TH44W322: begin r.m = 4; r.n = 4; r.w[0] = 3; r.w[1] = 2; r.w[2] = 2; end
      TH54W322: begin r.m = 5; r.n = 4; r.w[0] = 3; r.w[1] = 2; r.w[2] = 2; end
      THXOR0:   begin r.n = 4; r.table16 = 16'hF888; end  // AB + CD
      THAND0:   begin r.n = 4; r.table16 = 16'hFAC0; end  // AB + BC + AD
      TH24COMP: begin r.n = 4; r.table16 = 16'hEEE0; end  // (A+B)(C+D)
      default:  begin r.n = 4; end
    endcase
    return r;
  endfunction

  // Set condition of gate g for the input vector {A,B,C,D}.
  function automatic logic ref_set(ncl_gate_e g, logic [3:0] abcd);
    ref_gate_t   r;
    int unsigned sum;
    r = ref_gate(g);
    if (r.m == 0) return r.table16[abcd];
    sum = 0;
    for (int k = 0; k < 4; k++) begin
      if (abcd[3-k]) sum += r.w[k];
    end
    return sum >= r.m;
  endfunction

  // Mask of the inputs {A,B,C,D} a gate uses; the others are tied to 0.
  function automatic logic [3:0] ref_mask(ncl_gate_e g);
    ref_gate_t r;
    r = ref_gate(g);
    return 4'b1111 << (4 - r.n);
  endfunction

endpackage
