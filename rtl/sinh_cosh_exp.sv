// sinh_cosh_exp: sinh(X) and cosh(X) from the exponential datapath.
//
// sinh(X) = (e^X - e^-X) / 2 and cosh(X) = (e^X + e^-X) / 2. The two
// exponential paths of exp_paths give e^|X| and e^-|X|; two multiplexers,
// both steered by the sign bit of X, turn them into e^X (Mux1) and e^-X
// (Mux2) at the same time. One adder/subtractor forms e^X - e^-X and another
// e^X + e^-X, and a one-place arithmetic right shift of each divides by two.
// The structure follows the design; widths and the floor rounding of the
// shift are this implementation's choices.
//
// Interface: clk; x (X_W = 10 bits, two's complement, X_FRAC = 5 fraction
// bits, -16 .. +15.97); sinh_x and cosh_x are signed, EXP_W = 40 bits with
// EXP_FRAC = 16 fraction bits. Latency one clock cycle, one result per cycle.
// Because e^-|X| is taken as 0 for |X| >= 4, sinh and cosh there are
// +-e^|X| / 2 (relative error below 0.04 %).
module sinh_cosh_exp
  import hyp_pkg::*;
(
  input  logic                    clk,
  input  logic signed [X_W-1:0]   x,
  output logic signed [EXP_W-1:0] sinh_x,
  output logic signed [EXP_W-1:0] cosh_x
);

  logic [EXP_W-1:0]        exp_pos, exp_neg, e_x, e_mx;
  logic                    sign_q;
  logic signed [EXP_W:0]   diff, sum;

  exp_paths u_paths (.clk, .x, .exp_pos, .exp_neg, .sign_q);

  // Mux1 -> e^X, Mux2 -> e^-X
  assign e_x  = sign_q ? exp_neg : exp_pos;
  assign e_mx = sign_q ? exp_pos : exp_neg;

  // AddSub (a - b) and AddSub1 (a + b)
  assign diff = signed'({1'b0, e_x}) - signed'({1'b0, e_mx});
  assign sum  = signed'({1'b0, e_x}) + signed'({1'b0, e_mx});

  // Shift and Shift1: divide by two
  assign sinh_x = EXP_W'(diff >>> 1);
  assign cosh_x = EXP_W'(sum >>> 1);

endmodule
