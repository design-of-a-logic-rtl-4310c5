// ncl_le_pkg: types and constants shared by the reconfigurable NCL logic
// element and its testbenches.
//
// The logic element's 16-address lookup table is addressed by the four gate
// inputs as {A, B, C, D}, A being the most significant bit (address 6 is
// A=0 B=1 C=1 D=0).  An address holds 1 when that input pattern satisfies the
// gate's set condition.  Addresses 0 and 15 are the same for every NCL gate
// (0 and 1), so only addresses 14..1 are programmed, through Dp(14:1), where
// Dp(i) is the value of address i.
//
// ncl_gate_e lists the 27 fundamental NCL threshold gates; lut_table()
// returns the full 16-entry table of a gate from its set equation, and
// gate_dp() the 14-bit programming word.  Gates with fewer than four inputs
// use the leading inputs (A, B, then C) and expect the unused ones tied to 0.
// The encoding of the enum is this design's own; the equations are the
// standard set equations of the NCL gates.
package ncl_le_pkg;

  localparam int unsigned LUT_ADDRS = 16;  // addresses of the LUT
  localparam int unsigned DP_BITS   = 14;  // programmed addresses 14..1

  typedef logic [DP_BITS:1]    dp_t;      // programming word Dp(14:1)
  typedef logic [LUT_ADDRS-1:0] lut_t;    // full table, bit i = address i

  typedef enum logic [4:0] {
    TH12, TH22, TH13, TH23, TH33, TH23W2, TH33W2,
    TH14, TH24, TH34, TH44, TH24W2, TH34W2, TH44W2, TH34W3, TH44W3,
    TH24W22, TH34W22, TH44W22, TH54W22, TH34W32, TH54W32,
    TH44W322, TH54W322, THXOR0, THAND0, TH24COMP
  } ncl_gate_e;

  localparam int unsigned NUM_GATES = 27;

  // Set equation of gate g for inputs a, b, c, d.
  function automatic logic gate_set(ncl_gate_e g, logic a, logic b, logic c, logic d);
    unique case (g)
      TH12:     return a | b;
      TH22:     return a & b;
      TH13:     return a | b | c;
      TH23:     return (a & b) | (a & c) | (b & c);
      TH33:     return a & b & c;
      TH23W2:   return a | (b & c);
      TH33W2:   return (a & b) | (a & c);
      TH14:     return a | b | c | d;
      TH24:     return (a & b) | (a & c) | (a & d) | (b & c) | (b & d) | (c & d);
      TH34:     return (a & b & c) | (a & b & d) | (a & c & d) | (b & c & d);
      TH44:     return a & b & c & d;
      TH24W2:   return a | (b & c) | (b & d) | (c & d);
      TH34W2:   return (a & b) | (a & c) | (a & d) | (b & c & d);
      TH44W2:   return (a & b & c) | (a & b & d) | (a & c & d);
      TH34W3:   return a | (b & c & d);
      TH44W3:   return (a & b) | (a & c) | (a & d);
      TH24W22:  return a | b | (c & d);
      TH34W22:  return (a & b) | (a & c) | (a & d) | (b & c) | (b & d);
      TH44W22:  return (a & b) | (a & c & d) | (b & c & d);
      TH54W22:  return (a & b & c) | (a & b & d);
      TH34W32:  return a | (b & c) | (b & d);
      TH54W32:  return (a & b) | (a & c & d);
      TH44W322: return (a & b) | (a & c) | (a & d) | (b & c);
      TH54W322: return (a & b) | (a & c) | (b & c & d);
      THXOR0:   return (a & b) | (c & d);
      THAND0:   return (a & b) | (b & c) | (a & d);
      TH24COMP: return (a & c) | (b & c) | (a & d) | (b & d);
      default:  return 1'b0;
    endcase
  endfunction

  function automatic lut_t lut_table(ncl_gate_e g);
    lut_t t;
    for (int i = 0; i < LUT_ADDRS; i++) begin
      t[i] = gate_set(g, i[3], i[2], i[1], i[0]);
    end
    return t;
  endfunction

  function automatic dp_t gate_dp(ncl_gate_e g);
    return dp_t'(lut_table(g) >> 1);
  endfunction

  // Number of inputs a gate uses (n of THmn).
  function automatic int unsigned gate_inputs(ncl_gate_e g);
    unique case (g)
      TH12, TH22:                          return 2;
      TH13, TH23, TH33, TH23W2, TH33W2:    return 3;
      default:                             return 4;
    endcase
  endfunction

endpackage
