// tb_hyp_rom: checks every word of four small tables, one of each kind
// (e^v, e^-v, sinh v, cosh v), against values computed here with real
// arithmetic, and checks the one-cycle read latency: the word for an address
// must appear after the next rising edge and not before.
module tb_hyp_rom;
  import hyp_pkg::*;

  localparam int unsigned AW = 6, IF = 4, OF = 12, DW = 20;

  logic          clk = 1'b0;
  logic [AW-1:0] addr;
  logic [DW-1:0] d_exp, d_neg, d_sinh, d_cosh;
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  hyp_rom #(.KIND(TAB_EXP),     .ADDR_W(AW), .DATA_W(DW), .IN_FRAC(IF), .OUT_FRAC(OF)) u_exp  (.clk, .addr, .data(d_exp));
  hyp_rom #(.KIND(TAB_EXP_NEG), .ADDR_W(AW), .DATA_W(DW), .IN_FRAC(IF), .OUT_FRAC(OF)) u_neg  (.clk, .addr, .data(d_neg));
  hyp_rom #(.KIND(TAB_SINH),    .ADDR_W(AW), .DATA_W(DW), .IN_FRAC(IF), .OUT_FRAC(OF)) u_sinh (.clk, .addr, .data(d_sinh));
  hyp_rom #(.KIND(TAB_COSH),    .ADDR_W(AW), .DATA_W(DW), .IN_FRAC(IF), .OUT_FRAC(OF)) u_cosh (.clk, .addr, .data(d_cosh));

  function automatic real scaled(int kind, int a);
    real v, r;
    v = real'(a) / real'(1 << IF);
    case (kind)
      0: r = $exp(v);
      1: r = $exp(-v);
      2: r = ($exp(v) - $exp(-v)) / 2.0;
      default: r = ($exp(v) + $exp(-v)) / 2.0;
    endcase
    return r * real'(1 << OF);
  endfunction

  task automatic check_word(string what, int a, int kind, logic [DW-1:0] got);
    real want, err;
    want = scaled(kind, a);
    err  = real'(got) - want;
    checks++;
    if (err > 0.5001 || err < -0.5001) begin
      failures++;
      $display("FAIL %s[%0d]: got %0d want %f", what, a, got, want);
    end
  endtask

  initial begin
    addr = '0;
    @(posedge clk);
    for (int a = 0; a < (1 << AW); a++) begin
      @(negedge clk);
      addr = AW'(a);
      // before the edge the previous word is still shown
      if (a > 0) begin
        checks++;
        if (d_sinh != DW'($rtoi(scaled(2, a - 1) + 0.5))) begin
          failures++;
          $display("FAIL latency: word changed before the clock edge at %0d", a);
        end
      end
      @(posedge clk);
      #1;
      check_word("exp",  a, 0, d_exp);
      check_word("neg",  a, 1, d_neg);
      check_word("sinh", a, 2, d_sinh);
      check_word("cosh", a, 3, d_cosh);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
