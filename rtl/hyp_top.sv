// hyp_top: the exponential unit and three sinh/cosh designs side by side.
//
// All four units read the same input word X (10-bit two's complement, 5
// fraction bits) so that their results can be compared sample by sample:
//   exp_unit         e^X by decomposition (integer ROM x fraction ROM, plus a
//                    ROM of e^-|X| for negative X)
//   sinh_cosh_exp    sinh/cosh as (e^X -+ e^-X) / 2 on the same datapath
//   taylor_sinh_cosh sinh/cosh from a four-term series with power-of-two
//                    denominators
//   rom_sinh_cosh    sinh/cosh from two 128-word half-wave ROMs
// The ROM-based units answer one clock cycle after X is sampled; the series
// unit is combinational and answers within the cycle. The top adds no logic
// of its own.
//
// Outputs: exp_x (unsigned, 40 bits, 16 fraction bits); sinh_exp/cosh_exp
// (signed, 40 bits, 16 fraction bits); sinh_tay/cosh_tay (signed, 56 bits, 16
// fraction bits); sinh_rom/cosh_rom (signed, 16 bits, 10 fraction bits).
module hyp_top
  import hyp_pkg::*;
(
  input  logic                        clk,
  input  logic signed [X_W-1:0]       x,
  output logic [EXP_W-1:0]            exp_x,
  output logic signed [EXP_W-1:0]     sinh_exp,
  output logic signed [EXP_W-1:0]     cosh_exp,
  output logic signed [TAY_W-1:0]     sinh_tay,
  output logic signed [TAY_W-1:0]     cosh_tay,
  output logic signed [ROM_OUT_W-1:0] sinh_rom,
  output logic signed [ROM_OUT_W-1:0] cosh_rom
);

  exp_unit u_exp (.clk, .x, .exp_x);

  sinh_cosh_exp u_sc_exp (.clk, .x, .sinh_x(sinh_exp), .cosh_x(cosh_exp));

  taylor_sinh_cosh u_taylor (.x, .sinh_x(sinh_tay), .cosh_x(cosh_tay));

  rom_sinh_cosh u_rom (.clk, .x, .sinh_x(sinh_rom), .cosh_x(cosh_rom));

endmodule
