// tb_sinh_cosh_exp: sweeps every input code from -15.97 to +15.97 and
// compares sinh(X) and cosh(X), one cycle after X is applied, with
// real-arithmetic references. The tolerance covers the ROM rounding and the
// design's choice of e^-|X| = 0 for |X| >= 4. Also checks sinh(15) against
// 1.635e6 and cosh(15) against 1.635e6.
module tb_sinh_cosh_exp;
  import hyp_pkg::*;

  logic                    clk = 1'b0;
  logic signed [X_W-1:0]   x;
  logic signed [EXP_W-1:0] sinh_x, cosh_x;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sinh_cosh_exp dut (.clk, .x, .sinh_x, .cosh_x);

  localparam real SCALE = real'(1 << EXP_FRAC);

  task automatic cmp(string what, real xv, real got, real want);
    real tol;
    tol = (want < 0.0 ? -want : want) * 4.0e-4 + 4.0 / SCALE;
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      $display("FAIL %s(%f): got %f want %f", what, xv, got, want);
    end
  endtask

  initial begin
    real xv;
    x = '0;
    for (int c = -(1 << (X_W - 1)) + 1; c < (1 << (X_W - 1)); c++) begin
      @(negedge clk);
      x = X_W'(c);
      @(posedge clk);
      #1;
      xv = real'(c) / real'(1 << X_FRAC);
      cmp("sinh", xv, real'(sinh_x) / SCALE, ($exp(xv) - $exp(-xv)) / 2.0);
      cmp("cosh", xv, real'(cosh_x) / SCALE, ($exp(xv) + $exp(-xv)) / 2.0);
    end
    @(negedge clk);
    x = X_W'(15 << X_FRAC);
    @(posedge clk);
    #1;
    checks += 2;
    if (real'(sinh_x) / SCALE < 1.6345e6 || real'(sinh_x) / SCALE > 1.6355e6) failures++;
    if (real'(cosh_x) / SCALE < 1.6345e6 || real'(cosh_x) / SCALE > 1.6355e6) failures++;
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
