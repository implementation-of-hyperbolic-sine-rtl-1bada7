// tb_exp_unit: sweeps every input code from -16 to +15.97 and compares e^X,
// one clock cycle after X is applied, with a real-arithmetic reference. For
// X <= -4 the unit returns 0 by design. Also checks e^15 against the value
// 3.269e6 and that the result is not ready before the clock edge.
module tb_exp_unit;
  import hyp_pkg::*;

  logic                  clk = 1'b0;
  logic signed [X_W-1:0] x;
  logic [EXP_W-1:0]      exp_x;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  exp_unit dut (.clk, .x, .exp_x);

  localparam real SCALE = real'(1 << EXP_FRAC);

  function automatic real xval(int c);
    return real'(c) / real'(1 << X_FRAC);
  endfunction

  initial begin
    real want, got, tol;
    logic [EXP_W-1:0] prev;
    x = '0;
    for (int c = -(1 << (X_W - 1)); c < (1 << (X_W - 1)); c++) begin
      @(negedge clk);
      x = X_W'(c);
      @(posedge clk);
      #1;
      want = (xval(c) <= -4.0) ? 0.0 : $exp(xval(c)) * SCALE;
      got  = real'(exp_x);
      tol  = want * 2.0e-5 + 3.0;
      checks++;
      if (got - want > tol || want - got > tol) begin
        failures++;
        $display("FAIL x=%f: got %f want %f", xval(c), got / SCALE, want / SCALE);
      end
    end
    // e^15: 3.269e+06
    @(negedge clk);
    prev = exp_x;
    x = X_W'(15 << X_FRAC);
    #1;
    checks++;
    if (exp_x != prev) begin
      failures++;
      $display("FAIL: result present before the clock edge");
    end
    @(posedge clk);
    #1;
    got = real'(exp_x) / SCALE;
    checks++;
    if (got < 3.2685e6 || got > 3.2695e6) begin
      failures++;
      $display("FAIL e^15 = %f", got);
    end
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
