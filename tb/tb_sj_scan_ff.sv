// tb_sj_scan_ff: self-checking test of the scan-justification scan flip-flop.
//
// Reference model (edge level, written independently of the latch netlist):
// at each rising Clock edge the selected input (data_in or scan_in by
// test_mode) goes to the slave value m_l2, and also to the bypass value m_l3
// when test_opt is high; data_out must show m_l3 when test_opt is high and
// m_l2 otherwise. A clocking-mode step keeps Clock low, raises test_opt for
// one period (data_out must show m_l3 and the launch must be visible), then
// drops it and raises Clock: data_in at that moment becomes m_l2.
//
// Part 1 replays the published example: a 1 shifted into Latch 3, 0 shifted
// through Latch 2, normal operation following data_in, and the held 1
// reappearing in clocking mode. Part 2 runs random mode sequences.
// Clock period 10 time units: inputs change while Clock is low.
module tb_sj_scan_ff;
  import sj_pkg::*;

  logic clock, test_mode, test_opt, data_in, scan_in, data_out;
  logic m_l2, m_l3;
  int checks = 0, failures = 0;
  int n_mode[4];

  sj_scan_ff dut (
    .clock(clock), .test_mode(test_mode), .test_opt(test_opt),
    .data_in(data_in), .scan_in(scan_in), .data_out(data_out)
  );

  task automatic check(input logic exp, input string what);
    checks++;
    if (data_out !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: data_out=%0b expected %0b", $time, what, data_out, exp);
    end
  endtask

  task automatic set_mode(input op_mode_e m);
    {test_mode, test_opt} = m;
  endtask

  // One slow-clock period in a non-clocking mode.
  task automatic clock_cycle();
    logic sel;
    n_mode[decode_mode(test_mode, test_opt)]++;
    sel = test_mode ? scan_in : data_in;
    #5 clock = 1'b1;
    m_l2 = sel;
    if (test_opt) m_l3 = sel;
    #1;
    check(test_opt ? m_l3 : m_l2, "after rising edge");
    // Inputs changing while Clock is high must not reach the output.
    data_in = ~data_in;
    scan_in = ~scan_in;
    #1;
    check(test_opt ? m_l3 : m_l2, "edge triggered");
    #3 clock = 1'b0;
    #1;
    check(test_opt ? m_l3 : m_l2, "after falling edge");
  endtask

  // Clocking mode: test_opt high for one period with Clock low, then Clock
  // rises as test_opt falls. rsp is the response present on data_in.
  task automatic clocking_step(input logic rsp);
    set_mode(OP_CLOCKING);
    n_mode[OP_CLOCKING]++;
    #1;
    check(m_l3, "clocking mode shows Latch 3");
    data_in = rsp;
    #4;
    check(m_l3, "Latch 3 holds during clocking");
    test_opt = 1'b0;
    #1;
    check(m_l2, "output back to Latch 2");
    clock = 1'b1;
    m_l2 = rsp;
    #1;
    check(m_l2, "response moved to Latch 2");
    data_in = ~rsp;
    #3 clock = 1'b0;
    #1;
    check(m_l2, "response held");
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clock = 1'b0; data_in = 1'b0; scan_in = 1'b0;
    set_mode(OP_L3_SHIFT);
    #2;
    // Part 1: the published waveform example.
    scan_in = 1'b1;
    clock_cycle(); scan_in = 1'b1;
    clock_cycle(); scan_in = 1'b1;
    check(1'b1, "1 shifted into Latch 3");
    set_mode(OP_L2_SHIFT);
    scan_in = 1'b0;
    clock_cycle(); scan_in = 1'b0;
    clock_cycle();
    check(1'b0, "0 shifted through Latch 2");
    set_mode(OP_NORMAL);
    data_in = 1'b1;
    clock_cycle();
    check(1'b1, "normal mode follows data_in (1)");
    data_in = 1'b0;
    clock_cycle(); data_in = 1'b0;
    check(1'b0, "normal mode follows data_in (0)");
    clocking_step(1'b0);
    check(1'b0, "response after clocking");
    checks++;
    if (m_l3 !== 1'b1) begin
      failures++;
      $display("FAIL model: Latch 3 should still hold 1");
    end
    // Latch 3 still holds the 1 after all that.
    set_mode(OP_CLOCKING);
    #1 check(1'b1, "Latch 3 still holds the shifted 1");
    set_mode(OP_L2_SHIFT);
    #1;

    // Part 2: random mode sequences.
    for (int i = 0; i < 500; i++) begin
      data_in = 1'($urandom);
      scan_in = 1'($urandom);
      case ($urandom % 4)
        0: begin set_mode(OP_NORMAL);   clock_cycle(); end
        1: begin set_mode(OP_L2_SHIFT); clock_cycle(); end
        2: begin set_mode(OP_L3_SHIFT); clock_cycle(); end
        default: clocking_step(1'($urandom));
      endcase
    end

    foreach (n_mode[m]) begin
      checks++;
      if (n_mode[m] == 0) begin
        failures++;
        $display("FAIL coverage: mode %0d never used", m);
      end
    end
    $display("modes used: normal=%0d clocking=%0d L2=%0d L3=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
