// tb_rom_sinh_cosh: drives every input code with |X| < 4 and checks sinh(X)
// and cosh(X), one cycle later, against real-arithmetic references rounded
// to the 10 result fraction bits (sinh of a negative X must be the exact
// negation of the positive table word). Also checks X = 3.8125, where the
// design gives sinh = 22.62 and cosh = 22.64, and that the new result does
// not appear before the clock edge. A second instance with IN_FRAC = 7
// (table step 1/128, |X| < 1) is checked the same way.
module tb_rom_sinh_cosh;
  import hyp_pkg::*;

  logic                        clk = 1'b0;
  logic signed [X_W-1:0]       x;
  logic signed [ROM_OUT_W-1:0] sinh_x, cosh_x;
  int checks = 0, failures = 0;
  int neg_seen = 0;

  always #5 clk = ~clk;

  rom_sinh_cosh dut (.clk, .x, .sinh_x, .cosh_x);

  logic signed [ROM_OUT_W-1:0] sinh7, cosh7;
  rom_sinh_cosh #(.IN_FRAC(7)) dut7 (.clk, .x, .sinh_x(sinh7), .cosh_x(cosh7));

  localparam real SCALE = real'(1 << ROM_FRAC);

  initial begin
    real xv, ws, wc, mag;
    x = '0;
    for (int c = -127; c < 128; c++) begin
      @(negedge clk);
      x = X_W'(c);
      @(posedge clk);
      #1;
      // IN_FRAC = 7 instance: same code, read as c / 128
      xv  = real'(c) / 128.0;
      mag = xv < 0.0 ? -xv : xv;
      ws  = real'($rtoi(($exp(mag) - $exp(-mag)) / 2.0 * SCALE + 0.5));
      wc  = real'($rtoi(($exp(mag) + $exp(-mag)) / 2.0 * SCALE + 0.5));
      if (c < 0) ws = -ws;
      checks += 2;
      if (real'(sinh7) != ws || real'(cosh7) != wc) begin
        failures++;
        $display("FAIL IN_FRAC=7 at %f: got %0d %0d", xv, sinh7, cosh7);
      end
      xv  = real'(c) / real'(1 << X_FRAC);
      mag = xv < 0.0 ? -xv : xv;
      ws  = real'($rtoi(($exp(mag) - $exp(-mag)) / 2.0 * SCALE + 0.5));
      wc  = real'($rtoi(($exp(mag) + $exp(-mag)) / 2.0 * SCALE + 0.5));
      if (c < 0) begin
        ws = -ws;
        neg_seen++;
      end
      checks += 2;
      if (real'(sinh_x) != ws) begin
        failures++;
        $display("FAIL sinh(%f): got %0d want %0d", xv, sinh_x, $rtoi(ws));
      end
      if (real'(cosh_x) != wc) begin
        failures++;
        $display("FAIL cosh(%f): got %0d want %0d", xv, cosh_x, $rtoi(wc));
      end
    end
    // X = 3.8125 = 122/32, then X = 0 to look at the latency
    @(negedge clk);
    x = X_W'(122);
    @(posedge clk);
    #1;
    checks += 2;
    if (real'(sinh_x) / SCALE < 22.615 || real'(sinh_x) / SCALE > 22.625) failures++;
    if (real'(cosh_x) / SCALE < 22.635 || real'(cosh_x) / SCALE > 22.645) failures++;
    @(negedge clk);
    x = '0;
    #1;
    checks++;
    if (cosh_x == ROM_OUT_W'(1 << ROM_FRAC)) begin
      failures++;
      $display("FAIL: result present before the clock edge");
    end
    checks++;
    if (neg_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
