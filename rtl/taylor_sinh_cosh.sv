// taylor_sinh_cosh: sinh(X) and cosh(X) from a truncated series whose
// factorial denominators are replaced by constants that hardware can apply
// cheaply:
//   sinh(x) = x + 0.1667 x^3 + x^5 / 2^7 + x^7 / 2^12
//   cosh(x) = 1 + x^2 / 2 + x^4 / 2^4 + x^8 / 2^15
// A chain of seven multipliers forms x^2 .. x^8, each stage multiplying the
// previous power by x. Division by a power of two is an arithmetic right
// shift; the x^3 / 6 term uses a constant multiplier by 0.1667. Three adders
// per output sum the four terms. The terms, the multiplier chain and the
// constant follow the design; the working word (TAY_W = 56 bits, TAY_FRAC = 16
// fraction bits), the truncation after each multiplier and the 16-bit
// fraction of the 0.1667 constant are this implementation's choices.
//
// Interface: x (X_W = 10 bits, two's complement, X_FRAC = 5 fraction bits);
// sinh_x and cosh_x (TAY_W bits, signed, TAY_FRAC fraction bits). The circuit
// is purely combinational: the result is valid within the same clock cycle.
// The series only approximates sinh and cosh; it is meant for |X| < 4.
module taylor_sinh_cosh
  import hyp_pkg::*;
#(
  parameter int unsigned CMULT_FRAC = 16,
  parameter int unsigned CMULT_COEF = 10925   // round(0.1667 * 2^16)
) (
  input  logic signed [X_W-1:0]     x,
  output logic signed [TAY_W-1:0]   sinh_x,
  output logic signed [TAY_W-1:0]   cosh_x
);

  typedef logic signed [TAY_W-1:0] word_t;

  // Fixed-point product of two working words
  function automatic word_t fx_mul(word_t a, word_t b);
    logic signed [2*TAY_W-1:0] p;
    p = a * b;
    return word_t'(p >>> TAY_FRAC);
  endfunction

  localparam word_t ONE = word_t'(1) <<< TAY_FRAC;

  word_t xw, x2, x3, x4, x5, x6, x7, x8;
  word_t cm3;
  logic signed [TAY_W+CMULT_FRAC:0] cm_prod;

  assign xw = word_t'(x) <<< (TAY_FRAC - X_FRAC);

  // Mult .. Mult6
  assign x2 = fx_mul(xw, xw);
  assign x3 = fx_mul(x2, xw);
  assign x4 = fx_mul(x3, xw);
  assign x5 = fx_mul(x4, xw);
  assign x6 = fx_mul(x5, xw);
  assign x7 = fx_mul(x6, xw);
  assign x8 = fx_mul(x7, xw);

  // CMult: x^3 * 0.1667
  assign cm_prod = x3 * signed'({1'b0, CMULT_FRAC'(CMULT_COEF)});
  assign cm3     = word_t'(cm_prod >>> CMULT_FRAC);

  // AddSub .. AddSub2 (sinh), Constant and AddSub3 .. AddSub5 (cosh)
  assign sinh_x = xw + cm3 + (x5 >>> 7) + (x7 >>> 12);
  assign cosh_x = ONE + (x2 >>> 1) + (x4 >>> 4) + (x8 >>> 15);

endmodule
