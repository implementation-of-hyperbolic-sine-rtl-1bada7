// hyp_rom: synchronous read-only table of e^v, e^-v, sinh(v) or cosh(v).
//
// Word a of the table holds f(a / 2^IN_FRAC) rounded to OUT_FRAC fraction
// bits, where f is chosen by KIND. The contents are computed at elaboration
// by hyp_pkg::tab_value, so the ROM needs no data file. The read is
// registered: data shows the word of the address presented at the previous
// rising clock edge (one cycle of latency, as the block-RAM ROMs of the
// designs, drawn with an "addr z^-1" port). The output register has no reset,
// as in a block RAM; the first word is valid one cycle after the first edge.
//
// Interface: clk, addr (ADDR_W bits), data (DATA_W bits, unsigned).
module hyp_rom
  import hyp_pkg::*;
#(
  parameter tab_kind_e   KIND     = TAB_SINH,
  parameter int unsigned ADDR_W   = 7,
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned IN_FRAC  = 5,
  parameter int unsigned OUT_FRAC = 10
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  typedef logic [DATA_W-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned a = 0; a < DEPTH; a++)
      t[a] = DATA_W'(tab_value(KIND, a, IN_FRAC, OUT_FRAC));
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk)
    data <= TABLE[addr];

endmodule
