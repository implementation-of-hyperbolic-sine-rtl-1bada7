// exp_paths: the two exponential paths shared by the exponential unit and the
// exponential-based sinh/cosh design.
//
// The input X is split into its sign and its magnitude |X| (Absolute block).
// Positive path: e^|X| = e^int * e^fra, where int = |X|[8:5] addresses a
// 16-word ROM of e^0 .. e^15 and fra = |X|[4:0] addresses a 32-word ROM of
// e^(k/32); one multiplier joins the two words (the product rule of
// exponents). Negative path: e^-|X| is read from a 128-word ROM addressed by
// the 7 LSBs |X|[6:0] (0 .. 3.97 in steps of 1/32); when |X| >= 4 the word is
// replaced by the constant 0, since e^-4 and smaller are taken as zero.
// The ROM sizes (16 + 32 + 128 words), the 10-bit 1/4/5 input split and the
// zero constant follow the design; the word widths, the truncation of the
// product and the registers that keep the sign and the ">= 4" flag aligned
// with the ROM outputs are this implementation's choices.
//
// Interface: clk; x (X_W-bit two's complement, X_FRAC fraction bits).
// exp_pos = e^|X|, exp_neg = e^-|X| (both unsigned, EXP_FRAC fraction bits)
// and sign_q (sign of X) all refer to the x sampled at the previous rising
// edge: one cycle of latency, one result per cycle.
// Range: the integer ROM covers 0..15, so |X| must stay below 16; the most
// negative code (-16) gives exp_pos = e^0 * e^0 and must not be used on the
// positive path (exp_unit and sinh_cosh_exp only read exp_neg for it).
module exp_paths
  import hyp_pkg::*;
(
  input  logic                    clk,
  input  logic signed [X_W-1:0]   x,
  output logic [EXP_W-1:0]        exp_pos,
  output logic [EXP_W-1:0]        exp_neg,
  output logic                    sign_q
);

  logic [X_W-1:0]        abs_x;
  logic [X_INT-1:0]      int_part;
  logic [X_FRAC-1:0]     fra_part;
  logic [NEG_ADDR_W-1:0] neg_addr;
  logic                  big_q;      // |X| >= 4, aligned with the ROM words

  logic [INT_ROM_W-1:0]  e_int;
  logic [FRAC_ROM_W-1:0] e_fra;
  logic [NEG_ROM_W-1:0]  e_neg;
  logic [INT_ROM_W+FRAC_ROM_W-1:0] product;

  // Absolute block (unsigned result, so |-16| = 16 is representable)
  assign abs_x    = x[X_W-1] ? X_W'(-x) : X_W'(x);
  // Bit slices (BitBasher blocks)
  assign int_part = abs_x[X_FRAC +: X_INT];
  assign fra_part = abs_x[X_FRAC-1:0];
  assign neg_addr = abs_x[NEG_ADDR_W-1:0];

  hyp_rom #(.KIND(TAB_EXP), .ADDR_W(X_INT), .DATA_W(INT_ROM_W),
            .IN_FRAC(0), .OUT_FRAC(EXP_FRAC))
    u_rom_int  (.clk, .addr(int_part), .data(e_int));

  hyp_rom #(.KIND(TAB_EXP), .ADDR_W(X_FRAC), .DATA_W(FRAC_ROM_W),
            .IN_FRAC(X_FRAC), .OUT_FRAC(EXP_FRAC))
    u_rom_frac (.clk, .addr(fra_part), .data(e_fra));

  hyp_rom #(.KIND(TAB_EXP_NEG), .ADDR_W(NEG_ADDR_W), .DATA_W(NEG_ROM_W),
            .IN_FRAC(X_FRAC), .OUT_FRAC(EXP_FRAC))
    u_rom_neg  (.clk, .addr(neg_addr), .data(e_neg));

  always_ff @(posedge clk) begin
    sign_q <= x[X_W-1];
    big_q  <= |abs_x[X_W-1:NEG_ADDR_W];
  end

  // Mult: both words carry EXP_FRAC fraction bits, drop EXP_FRAC of them
  assign product = e_int * e_fra;
  assign exp_pos = product[EXP_FRAC +: EXP_W];

  // Mux1: constant 0 once |X| >= 4
  assign exp_neg = big_q ? '0 : EXP_W'(e_neg);

endmodule
