// tb_hyp_top: end-to-end test of all units at their default sizes.
//
// Applies every input code X in turn (one per clock) and, one cycle later,
// checks e^X, and sinh/cosh from the exponential, series and ROM units
// against real-arithmetic references. It repeats the sweeps over which the
// units are evaluated: -15 .. +15 for the exponential-based unit and
// -3.8 .. +3.8 for the series and ROM units, and prints each unit's largest
// error and mean relative error (in percent) over its sweep.
//
// It also counts how often each selection in the datapath was exercised and
// fails if one never was: the positive and negative exponential paths, the
// zero constant for e^-|X| when |X| >= 4, the swap of e^X and e^-X for
// negative X, and the negated and plain words of the half-wave sinh ROM.
module tb_hyp_top;
  import hyp_pkg::*;

  logic                        clk = 1'b0;
  logic signed [X_W-1:0]       x;
  logic [EXP_W-1:0]            exp_x;
  logic signed [EXP_W-1:0]     sinh_exp, cosh_exp;
  logic signed [TAY_W-1:0]     sinh_tay, cosh_tay;
  logic signed [ROM_OUT_W-1:0] sinh_rom, cosh_rom;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_pos_path = 0, n_neg_path = 0, n_neg_zero = 0;
  int n_swap = 0, n_rom_negate = 0, n_rom_plain = 0;

  // error statistics: 0 = exp design, 1 = series, 2 = ROM
  real sum_rel_s[3], sum_rel_c[3], max_rel_s[3], max_rel_c[3];
  int  n_pts[3];

  always #5 clk = ~clk;

  hyp_top dut (.*);

  localparam real SE = real'(1 << EXP_FRAC);
  localparam real ST = real'(longint'(1) << TAY_FRAC);
  localparam real SR = real'(1 << ROM_FRAC);

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic cmp(string what, real xv, real got, real want, real tol);
    checks++;
    if (rabs(got - want) > tol) begin
      failures++;
      $display("FAIL %s(%f): got %f want %f", what, xv, got, want);
    end
  endtask

  task automatic stat(int d, real gs, real gc, real ws, real wc);
    real rs;
    rs = (ws == 0.0) ? 0.0 : rabs(gs - ws) / rabs(ws) * 100.0;
    sum_rel_s[d] += rs;
    sum_rel_c[d] += rabs(gc - wc) / wc * 100.0;
    if (rs > max_rel_s[d]) max_rel_s[d] = rs;
    if (rabs(gc - wc) / wc * 100.0 > max_rel_c[d]) max_rel_c[d] = rabs(gc - wc) / wc * 100.0;
    n_pts[d]++;
  endtask

  initial begin
    real xv, es, ec, ts, tc, tol;
    string names[3] = '{"exponential", "series", "ROM"};
    for (int d = 0; d < 3; d++) begin
      sum_rel_s[d] = 0.0; sum_rel_c[d] = 0.0;
      max_rel_s[d] = 0.0; max_rel_c[d] = 0.0; n_pts[d] = 0;
    end
    x = '0;
    for (int c = -(1 << (X_W - 1)) + 1; c < (1 << (X_W - 1)); c++) begin
      @(negedge clk);
      x = X_W'(c);
      xv = real'(c) / real'(1 << X_FRAC);
      es = ($exp(xv) - $exp(-xv)) / 2.0;
      ec = ($exp(xv) + $exp(-xv)) / 2.0;
      ts = xv + 0.1667 * xv**3 + xv**5 / 128.0 + xv**7 / 4096.0;
      tc = 1.0 + xv**2 / 2.0 + xv**4 / 16.0 + xv**8 / 32768.0;
      // series unit: combinational, check before the edge
      #1;
      if (rabs(xv) < 4.0) begin
        cmp("sinh_tay", xv, real'(sinh_tay) / ST, ts, 0.002);
        cmp("cosh_tay", xv, real'(cosh_tay) / ST, tc, 0.002);
      end
      @(posedge clk);
      #1;
      // exponential unit
      if (xv <= -4.0) begin
        n_neg_zero++;
        cmp("exp", xv, real'(exp_x) / SE, 0.0, 0.0);
      end else begin
        if (c < 0) n_neg_path++; else n_pos_path++;
        cmp("exp", xv, real'(exp_x) / SE, $exp(xv), $exp(xv) * 2.0e-5 + 3.0 / SE);
      end
      // exponential-based sinh/cosh
      if (c < 0) n_swap++;
      tol = rabs(es) * 4.0e-4 + 4.0 / SE;
      cmp("sinh_exp", xv, real'(sinh_exp) / SE, es, tol);
      cmp("cosh_exp", xv, real'(cosh_exp) / SE, ec, ec * 4.0e-4 + 4.0 / SE);
      if (rabs(xv) <= 15.0)
        stat(0, real'(sinh_exp) / SE, real'(cosh_exp) / SE, es, ec);
      // ROM unit (table covers |X| < 4)
      if (rabs(xv) < 4.0) begin
        if (c < 0) n_rom_negate++; else n_rom_plain++;
        cmp("sinh_rom", xv, real'(sinh_rom) / SR, es, 0.51 / SR);
        cmp("cosh_rom", xv, real'(cosh_rom) / SR, ec, 0.51 / SR);
      end
      if (rabs(xv) <= 3.8) begin
        stat(1, real'(sinh_tay) / ST, real'(cosh_tay) / ST, es, ec);
        stat(2, real'(sinh_rom) / SR, real'(cosh_rom) / SR, es, ec);
      end
    end

    for (int d = 0; d < 3; d++)
      $display("%-12s sinh: mean %7.4f %% max %8.4f %%   cosh: mean %7.4f %% max %8.4f %%  (%0d points)",
               names[d], sum_rel_s[d] / n_pts[d], max_rel_s[d],
               sum_rel_c[d] / n_pts[d], max_rel_c[d], n_pts[d]);
    $display("mechanisms: pos_path=%0d neg_path=%0d neg_zero=%0d swap=%0d rom_negate=%0d rom_plain=%0d",
             n_pos_path, n_neg_path, n_neg_zero, n_swap, n_rom_negate, n_rom_plain);
    checks += 6;
    if (n_pos_path == 0)   failures++;
    if (n_neg_path == 0)   failures++;
    if (n_neg_zero == 0)   failures++;
    if (n_swap == 0)       failures++;
    if (n_rom_negate == 0) failures++;
    if (n_rom_plain == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
