// tb_exp_paths: drives every 10-bit input code and checks, one cycle later,
// e^|X| on the positive path (integer ROM x fraction ROM product), e^-|X| on
// the negative path (zero once |X| >= 4) and the delayed sign bit. Reference
// values are computed here with real arithmetic.
module tb_exp_paths;
  import hyp_pkg::*;

  logic                  clk = 1'b0;
  logic signed [X_W-1:0] x;
  logic [EXP_W-1:0]      exp_pos, exp_neg;
  logic                  sign_q;
  int checks = 0, failures = 0;
  int zeroed = 0;

  always #5 clk = ~clk;

  exp_paths dut (.clk, .x, .exp_pos, .exp_neg, .sign_q);

  localparam real SCALE = real'(1 << EXP_FRAC);

  initial begin
    x = '0;
    for (int c = -(1 << (X_W - 1)); c < (1 << (X_W - 1)); c++) begin
      real mag, want, got, tol;
      @(negedge clk);
      x = X_W'(c);
      @(posedge clk);
      #1;
      mag = (c < 0 ? -real'(c) : real'(c)) / real'(1 << X_FRAC);
      // positive path (|X| = 16 is outside the integer ROM)
      if (mag < 16.0) begin
        want = $exp(mag) * SCALE;
        got  = real'(exp_pos);
        tol  = want * 2.0e-5 + 3.0;
        checks++;
        if (got - want > tol || want - got > tol) begin
          failures++;
          $display("FAIL exp_pos x=%0d: got %f want %f", c, got, want);
        end
      end
      // negative path
      want = (mag >= 4.0) ? 0.0 : $exp(-mag) * SCALE;
      if (mag >= 4.0) zeroed++;
      got  = real'(exp_neg);
      checks++;
      if (got - want > 0.51 || want - got > 0.51) begin
        failures++;
        $display("FAIL exp_neg x=%0d: got %f want %f", c, got, want);
      end
      checks++;
      if (sign_q != (c < 0)) begin
        failures++;
        $display("FAIL sign x=%0d", c);
      end
    end
    checks++;
    if (zeroed == 0) failures++;
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
