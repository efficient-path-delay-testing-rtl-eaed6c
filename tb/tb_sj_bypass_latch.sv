// tb_sj_bypass_latch: self-checking test of Latch 3.
// For random clkb / test_opt / d, the latch must load d only while clkb and
// test_opt are both high, and hold in the three other cases (in particular
// with test_opt high and the clock low, the clocking-mode case).
module tb_sj_bypass_latch;
  logic clkb, test_opt, d, q;
  logic model;
  int checks = 0, failures = 0;
  int loads = 0, holds_clocking = 0;

  sj_bypass_latch dut (.clkb(clkb), .test_opt(test_opt), .d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clkb = 1'b1; test_opt = 1'b1; d = 1'b0; #1;
    model = 1'b0;
    for (int i = 0; i < 400; i++) begin
      clkb     = 1'($urandom);
      test_opt = 1'($urandom);
      d        = 1'($urandom);
      #1;
      if (clkb && test_opt) begin
        model = d;
        loads++;
      end else if (test_opt && !clkb) begin
        holds_clocking++;
      end
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL step %0d clkb=%0b test_opt=%0b d=%0b: q=%0b expected %0b",
                 i, clkb, test_opt, d, q, model);
      end
    end
    checks++;
    if (loads == 0 || holds_clocking == 0) begin
      failures++;
      $display("FAIL coverage: loads=%0d clocking holds=%0d", loads, holds_clocking);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
