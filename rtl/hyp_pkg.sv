// hyp_pkg: fixed-point formats and table generator shared by the sinh/cosh
// designs.
//
// Every design takes the same input word X (also called Theta): a 10-bit two's
// complement number with 4 integer bits and 5 fraction bits (1 sign bit,
// 4 bits before the binary point, 5 after), so X covers -16 .. +15.96875 in
// steps of 1/32. The 10-bit width and its 1/4/5 split follow the exponential
// design; the other designs reuse it so they can share one input.
//
// The ROM contents are not stored as data files. They are computed at
// elaboration by tab_value(), which evaluates e^v, e^-v, sinh(v) or cosh(v)
// for v = addr / 2^in_frac with exact integer arithmetic: e^v is summed as a
// Maclaurin series (term_k = term_(k-1) * v / k) in 48-bit fixed point, e^-v
// is 2^96 / e^v, and the result is rounded to out_frac fraction bits.
package hyp_pkg;

  // Input word X / Theta
  localparam int unsigned X_W    = 10;
  localparam int unsigned X_INT  = 4;
  localparam int unsigned X_FRAC = 5;

  // Exponential datapath (exp_paths, exp_unit, sinh_cosh_exp)
  localparam int unsigned EXP_FRAC      = 16;  // fraction bits of every exp result
  localparam int unsigned EXP_W         = 40;  // e^15.97 < 2^24 -> 24 integer bits
  localparam int unsigned INT_ROM_W     = 38;  // e^15 < 2^22 -> 22 integer bits
  localparam int unsigned FRAC_ROM_W    = 18;  // e^0.97 < 2^2 -> 2 integer bits
  localparam int unsigned NEG_ADDR_W    = 7;   // 2^7 = 128 words of e^-v, v < 4
  localparam int unsigned NEG_ROM_W     = EXP_FRAC + 1;  // e^-v <= 1

  // ROM-approach design (rom_sinh_cosh)
  localparam int unsigned ROM_ADDR_W = 7;   // 7 LSBs of |X|
  localparam int unsigned ROM_OUT_W  = 16;  // signed result word
  localparam int unsigned ROM_FRAC   = 10;  // fraction bits of the result

  // Series design (taylor_sinh_cosh)
  localparam int unsigned TAY_W    = 56;  // signed working word
  localparam int unsigned TAY_FRAC = 16;  // fraction bits of the working word

  typedef enum logic [1:0] {
    TAB_EXP     = 2'd0,   // e^v
    TAB_EXP_NEG = 2'd1,   // e^-v
    TAB_SINH    = 2'd2,   // sinh(v)
    TAB_COSH    = 2'd3    // cosh(v)
  } tab_kind_e;

  localparam int unsigned CALC_FRAC = 48;

  // e^v in CALC_FRAC fixed point, v = num / 2^in_frac, v < 32.
  function automatic logic [127:0] exp_calc(int unsigned num, int unsigned in_frac);
    logic [127:0] v, term, sum;
    v    = 128'(num) << (CALC_FRAC - in_frac);
    term = 128'(1) << CALC_FRAC;
    sum  = term;
    for (int k = 1; k < 160; k++) begin
      term = ((term * v) >> CALC_FRAC) / 128'(k);
      sum  = sum + term;
    end
    return sum;
  endfunction

  // Table word for address addr, rounded to out_frac fraction bits.
  function automatic logic [63:0] tab_value(tab_kind_e kind, int unsigned addr,
                                            int unsigned in_frac, int unsigned out_frac);
    logic [127:0] ep, en, r;
    ep = exp_calc(addr, in_frac);
    en = (128'(1) << (2 * CALC_FRAC)) / ep;
    unique case (kind)
      TAB_EXP:     r = ep;
      TAB_EXP_NEG: r = en;
      TAB_SINH:    r = (ep - en) >> 1;
      default:     r = (ep + en) >> 1;
    endcase
    r = (r + (128'(1) << (CALC_FRAC - out_frac - 1))) >> (CALC_FRAC - out_frac);
    return r[63:0];
  endfunction

endpackage
