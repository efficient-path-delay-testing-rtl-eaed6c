// tb_sj_scan_chain: self-checking test of a chain of scan-justification
// flip-flops, at the default length (3) and at length 6.
//
// An edge-level reference keeps, per cell, the slave value (Latch 2) and the
// bypass value (Latch 3). At each rising Clock edge every cell takes its
// selected input (d[i], or the previous cell's output in the shift modes);
// Latch 3 takes it too when test_opt is high. The visible output of a cell
// is Latch 3 while test_opt is high, else Latch 2. Random sequences of the
// four modes are run, including clocking steps (test_opt high with Clock low
// for one period, then Clock rising as test_opt falls).
module tb_sj_scan_chain;
  import sj_pkg::*;

  localparam int N1 = 3;
  localparam int N2 = 6;

  logic clock, test_mode, test_opt, scan_in;
  logic [N1-1:0] d1, q1;
  logic [N2-1:0] d2, q2;
  logic so1, so2;
  int checks = 0, failures = 0;
  int n_mode[4];

  // Reference state of the longer chain; the first N1 cells of the short
  // chain see the same inputs when d1 = d2[N1-1:0].
  logic [N2-1:0] m2_l2, m2_l3;
  logic [N1-1:0] m1_l2, m1_l3;

  sj_scan_chain dut1 (
    .clock(clock), .test_mode(test_mode), .test_opt(test_opt),
    .scan_in(scan_in), .d(d1), .q(q1), .scan_out(so1)
  );
  sj_scan_chain #(.N(N2)) dut2 (
    .clock(clock), .test_mode(test_mode), .test_opt(test_opt),
    .scan_in(scan_in), .d(d2), .q(q2), .scan_out(so2)
  );

  function automatic logic [N2-1:0] vis2();
    return test_opt ? m2_l3 : m2_l2;
  endfunction
  function automatic logic [N1-1:0] vis1();
    return test_opt ? m1_l3 : m1_l2;
  endfunction

  task automatic compare(input string what);
    checks++;
    if (q1 !== vis1() || so1 !== vis1()[N1-1] || q2 !== vis2() || so2 !== vis2()[N2-1]) begin
      failures++;
      $display("FAIL t=%0t %s: q1=%b exp %b  q2=%b exp %b", $time, what, q1, vis1(), q2, vis2());
    end
  endtask

  task automatic rise_update();
    logic [N2-1:0] s2;
    logic [N1-1:0] s1;
    if (test_mode) begin
      s2 = {vis2()[N2-2:0], scan_in};
      s1 = {vis1()[N1-2:0], scan_in};
    end else begin
      s2 = d2;
      s1 = d1;
    end
    m2_l2 = s2; m1_l2 = s1;
    if (test_opt) begin
      m2_l3 = s2; m1_l3 = s1;
    end
  endtask

  task automatic clock_cycle();
    n_mode[decode_mode(test_mode, test_opt)]++;
    rise_update();
    #5 clock = 1'b1;
    #1 compare("after rising edge");
    d1 = N1'($urandom); d2 = N2'($urandom); scan_in = 1'($urandom);
    #1 compare("stable while Clock high");
    #3 clock = 1'b0;
    #1 compare("after falling edge");
  endtask

  task automatic clocking_step();
    {test_mode, test_opt} = OP_CLOCKING;
    n_mode[OP_CLOCKING]++;
    #1 compare("clocking mode shows Latch 3");
    d1 = N1'($urandom); d2 = N2'($urandom);
    #4 compare("Latch 3 holds");
    test_opt = 1'b0;
    rise_update();
    #1 clock = 1'b1;
    #1 compare("response captured");
    #3 clock = 1'b0;
    #1 compare("response held");
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clock = 1'b0; scan_in = 1'b0; d1 = '0; d2 = '0;
    // Define every latch: fill both slave and bypass through the scan path.
    {test_mode, test_opt} = OP_L3_SHIFT;
    #1;
    m1_l2 = '0; m1_l3 = '0; m2_l2 = '0; m2_l3 = '0;
    repeat (N2) begin
      scan_in = 1'b0;
      #5 clock = 1'b1;
      #5 clock = 1'b0;
    end
    #1 compare("after initial fill");
    for (int i = 0; i < 600; i++) begin
      scan_in = 1'($urandom);
      case ($urandom % 5)
        0: begin {test_mode, test_opt} = OP_NORMAL;   clock_cycle(); end
        1, 2: begin {test_mode, test_opt} = OP_L2_SHIFT; clock_cycle(); end
        3: begin {test_mode, test_opt} = OP_L3_SHIFT; clock_cycle(); end
        default: clocking_step();
      endcase
      d2[N1-1:0] = d1;
    end
    foreach (n_mode[m]) begin
      checks++;
      if (n_mode[m] == 0) begin
        failures++;
        $display("FAIL coverage: mode %0d never used", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
