// exp_unit: e^X of a 10-bit signed fixed-point input, by decomposition.
//
// e^X is formed from the integer and the fraction part of |X| with two small
// ROMs and a multiplier (e^(int.fra) = e^int * e^fra), and from a third ROM of
// e^-|X| for negative inputs; see exp_paths. The output multiplexer selects
// the positive path when the sign bit of X is 0 and the negative path when it
// is 1. This is the whole exponential design; the sinh/cosh design of
// sinh_cosh_exp is built on the same two paths.
//
// Interface: clk; x (X_W = 10 bits, two's complement, X_FRAC = 5 fraction
// bits, useful range -16 .. +15.97); exp_x = e^X, unsigned, EXP_W = 40 bits
// with EXP_FRAC = 16 fraction bits. Latency one clock cycle (the registered
// ROM read), throughput one result per cycle. For X <= -4 the result is 0.
module exp_unit
  import hyp_pkg::*;
(
  input  logic                  clk,
  input  logic signed [X_W-1:0] x,
  output logic [EXP_W-1:0]      exp_x
);

  logic [EXP_W-1:0] exp_pos, exp_neg;
  logic             sign_q;

  exp_paths u_paths (.clk, .x, .exp_pos, .exp_neg, .sign_q);

  // Mux: sel = sign bit of X
  assign exp_x = sign_q ? exp_neg : exp_pos;

endmodule
