// tb_taylor_sinh_cosh: sweeps every input code with |X| < 4 and compares the
// outputs with the same four-term series evaluated here in real arithmetic:
//   sinh = x + 0.1667 x^3 + x^5/2^7 + x^7/2^12
//   cosh = 1 + x^2/2 + x^4/2^4 + x^8/2^15
// The tolerance (0.002) covers the truncation after each fixed-point
// multiplier. The unit is combinational, so results are read 1 ns after X
// changes. Also reports the largest deviation from the true sinh and cosh.
module tb_taylor_sinh_cosh;
  import hyp_pkg::*;

  logic signed [X_W-1:0]   x;
  logic signed [TAY_W-1:0] sinh_x, cosh_x;
  int checks = 0, failures = 0;

  taylor_sinh_cosh dut (.x, .sinh_x, .cosh_x);

  localparam real SCALE = real'(longint'(1) << TAY_FRAC);

  task automatic cmp(string what, real xv, real got, real want);
    checks++;
    if (got - want > 0.002 || want - got > 0.002) begin
      failures++;
      $display("FAIL %s(%f): got %f want %f", what, xv, got, want);
    end
  endtask

  initial begin
    real xv, ws, wc, dev_s, dev_c, d;
    dev_s = 0.0;
    dev_c = 0.0;
    for (int c = -127; c < 128; c++) begin
      x = X_W'(c);
      #1;
      xv = real'(c) / real'(1 << X_FRAC);
      ws = xv + 0.1667 * xv**3 + xv**5 / 128.0 + xv**7 / 4096.0;
      wc = 1.0 + xv**2 / 2.0 + xv**4 / 16.0 + xv**8 / 32768.0;
      cmp("sinh", xv, real'(sinh_x) / SCALE, ws);
      cmp("cosh", xv, real'(cosh_x) / SCALE, wc);
      d = real'(sinh_x) / SCALE - ($exp(xv) - $exp(-xv)) / 2.0;
      if (d < 0.0) d = -d;
      if (d > dev_s) dev_s = d;
      d = real'(cosh_x) / SCALE - ($exp(xv) + $exp(-xv)) / 2.0;
      if (d < 0.0) d = -d;
      if (d > dev_c) dev_c = d;
    end
    $display("largest deviation from true sinh %f, cosh %f (|x| < 4)", dev_s, dev_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
