// tb_sj_latch: self-checking test of the level-sensitive latch.
// Drives random d with en high (q must follow d at once) and en low (q must
// keep the value it had when en fell). Reference: a variable updated from d
// only while en is high.
module tb_sj_latch;
  logic en, d, q;
  int checks = 0, failures = 0;
  logic held;

  sj_latch dut (.en(en), .d(d), .q(q));

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1; d = 1'b0; #1;
    check(1'b0, "transparent 0");
    d = 1'b1; #1;
    check(1'b1, "transparent 1");
    for (int i = 0; i < 200; i++) begin
      en = 1'b1;
      d  = 1'($urandom);
      #1;
      check(d, "follow");
      held = d;
      en = 1'b0;
      #1;
      repeat (3) begin
        d = 1'($urandom);
        #1;
        check(held, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
