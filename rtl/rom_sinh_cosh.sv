// rom_sinh_cosh: sinh(X) and cosh(X) read from two half-wave ROMs.
//
// Only X >= 0 is tabulated. The magnitude |X| is sliced to its 7 least
// significant bits, which address a sinh ROM and a cosh ROM of 128 words
// each. cosh is even, so its word is the result. sinh is odd, so its word is
// passed on when the sign bit of X is 0 and negated when it is 1 (output
// multiplexer fed by the ROM word and by its negation). Storing half the wave
// halves the sinh table. This structure follows the design. With the shared
// input format (5 fraction bits) the 7-bit address spans |X| = 0 .. 3.97 in
// steps of 1/32; the result word width and its 10 fraction bits, and the
// register that keeps the sign aligned with the ROM word, are this
// implementation's choices.
//
// Interface: clk; x (IN_W bits, two's complement, IN_FRAC fraction bits);
// sinh_x and cosh_x (OUT_W bits, signed, OUT_FRAC fraction bits). Latency
// one clock cycle (registered ROM read), one result per cycle. Inputs with
// |X| >= 2^(ADDR_W-IN_FRAC) = 4 are outside the table: the slice keeps only
// the low address bits, so the result wraps, as the sliced design does.
module rom_sinh_cosh
  import hyp_pkg::*;
#(
  parameter int unsigned IN_W     = X_W,
  parameter int unsigned IN_FRAC  = X_FRAC,
  parameter int unsigned ADDR_W   = ROM_ADDR_W,
  parameter int unsigned OUT_W    = ROM_OUT_W,
  parameter int unsigned OUT_FRAC = ROM_FRAC
) (
  input  logic                    clk,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] sinh_x,
  output logic signed [OUT_W-1:0] cosh_x
);

  logic [IN_W-1:0]    abs_x;
  logic [ADDR_W-1:0]  addr;
  logic [OUT_W-2:0]   sinh_word, cosh_word;
  logic               sign_q;

  // Absolute, then Slice2 (7 LSBs)
  assign abs_x = x[IN_W-1] ? IN_W'(-x) : IN_W'(x);
  assign addr  = abs_x[ADDR_W-1:0];

  hyp_rom #(.KIND(TAB_SINH), .ADDR_W(ADDR_W), .DATA_W(OUT_W-1),
            .IN_FRAC(IN_FRAC), .OUT_FRAC(OUT_FRAC))
    u_rom_sinh (.clk, .addr, .data(sinh_word));

  hyp_rom #(.KIND(TAB_COSH), .ADDR_W(ADDR_W), .DATA_W(OUT_W-1),
            .IN_FRAC(IN_FRAC), .OUT_FRAC(OUT_FRAC))
    u_rom_cosh (.clk, .addr, .data(cosh_word));

  // Slice1: the sign bit, delayed to meet the ROM word
  always_ff @(posedge clk)
    sign_q <= x[IN_W-1];

  // Negate and Mux
  assign sinh_x = sign_q ? -signed'({1'b0, sinh_word}) : signed'({1'b0, sinh_word});
  assign cosh_x = signed'({1'b0, cosh_word});

endmodule
