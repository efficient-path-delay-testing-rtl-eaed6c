// tb_sj_top: end-to-end test of S27 built with scan-justification flip-flops.
//
// 1. Justification search: every Pp0/Ps0 is applied to the target circuit
//    for the worked example (first pattern '10X' on G11, G10, G13); the
//    inputs that raise tgt_hit are collected and checked against the
//    reference model.
// 2. Scan-justification test, for every justifying Pp0/Ps0 and every Ps2:
//    Ps2 is shifted into Latch 3 (L3 shift), Ps0 into Latch 2 (L2 shift),
//    one slow Clock period in normal mode produces Ps1 (checked against the
//    target), the circuit rests in (Pp1, Ps1) for the rest of the second slow
//    period, then test_opt is raised for one functional clock period with
//    Clock low: the state lines must jump from Ps1 to Ps2 (the launched
//    transition) and Latch 1 captures Rs2. Clock rises as test_opt falls;
//    Rs2 = S27(Pp2, Ps2) is then read out in L2 shift mode and compared.
// 3. Functional-justification test on random patterns: Ps1 shifted into
//    Latch 2, one slow period then one functional period in normal mode,
//    response read out and compared.
// Each mechanism (both shift modes, normal mode, clocking mode, a launched
// transition, a justifying input, a functional-justification run) is counted
// and must occur. Slow period 20, functional period 10 time units.
module tb_sj_top;
  import sj_pkg::*;
  import s27_ref_pkg::*;

  localparam int SLOW = 20;
  localparam int FAST = 10;
  localparam int NFF  = 3;

  logic clock, test_mode, test_opt, scan_in, po, scan_out, tgt_po, tgt_hit;
  logic [3:0] pi, tgt_pi;
  logic [2:0] st, tgt_st, tgt_ns;
  int checks = 0, failures = 0;

  int n_l3 = 0, n_l2 = 0, n_norm = 0, n_clk = 0, n_launch = 0;
  int n_hits = 0, n_sj = 0, n_fj = 0;
  logic [6:0] hits[$];

  sj_top dut (.*);

  task automatic chk(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL t=%0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  task automatic slow_cycle();
    #(SLOW/2) clock = 1'b1;
    #(SLOW/2) clock = 1'b0;
  endtask

  // Shift a pattern in; bit N-1 goes first so that cell i ends with pat[i].
  task automatic shift_in(input op_mode_e m, input logic [2:0] pat);
    {test_mode, test_opt} = m;
    for (int k = NFF - 1; k >= 0; k--) begin
      scan_in = pat[k];
      slow_cycle();
      if (m == OP_L3_SHIFT) n_l3++; else n_l2++;
    end
  endtask

  // Read the state out through scan_out in L2 shift mode (cell N-1 first).
  task automatic shift_out(output logic [2:0] pat);
    {test_mode, test_opt} = OP_L2_SHIFT;
    for (int k = NFF - 1; k >= 0; k--) begin
      #1 pat[k] = scan_out;
      scan_in = 1'b0;
      #(SLOW/2 - 1) clock = 1'b1;
      #(SLOW/2) clock = 1'b0;
      n_l2++;
    end
  endtask

  task automatic scan_justification(input logic [3:0] pp0, input logic [2:0] ps0,
                                    input logic [3:0] pp1, input logic [3:0] pp2,
                                    input logic [2:0] ps2);
    logic [2:0] ps1, rs2, got;
    time t_rise, t_fall;
    shift_in(OP_L3_SHIFT, ps2);
    #1 chk(st, ps2, "Ps2 in Latch 3");
    shift_in(OP_L2_SHIFT, ps0);
    #1 chk(st, ps0, "Ps0 in Latch 2");
    // First slow period: Pp0, Ps0 applied, Ps1 captured at the rising edge.
    {test_mode, test_opt} = OP_NORMAL;
    pi = pp0;
    ps1 = s27_ns(pp0, ps0);
    #(SLOW/2 - 1) clock = 1'b1;
    n_norm++;
    #1 chk(st, ps1, "Ps1 on the state lines");
    chk(ps1[1:0], 2'b10, "Ps1 meets the required first pattern");
    // Second slow period: the circuit settles in (Pp1, Ps1).
    pi = pp1;
    #(SLOW/2 - 1) clock = 1'b0;
    #(SLOW - 1);
    chk(st, ps1, "state held through the second slow period");
    chk(po, s27_eval(pp1, ps1).g17, "Rp1 on the primary output");
    // Clocking mode: test_opt is the functional clock, Clock stays low.
    {test_mode, test_opt} = OP_CLOCKING;
    pi = pp2;
    t_rise = $time;
    n_clk++;
    #1 chk(st, ps2, "launch: Ps2 from Latch 3");
    if (ps1 != ps2) n_launch++;
    chk(po, s27_eval(pp2, ps2).g17, "Rp2 on the primary output");
    #(FAST - 1) test_opt = 1'b0;
    t_fall = $time;
    checks++;
    if (t_fall - t_rise != FAST) begin
      failures++;
      $display("FAIL test_opt pulse lasted %0t, not one functional period", t_fall - t_rise);
    end
    clock = 1'b1;   // same instant as test_opt falling: Latch 1 closes on Rs2
    rs2 = s27_ns(pp2, ps2);
    #1 chk(st, rs2, "Rs2 captured");
    #(SLOW/2 - 1) clock = 1'b0;
    shift_out(got);
    chk(got, rs2, "Rs2 read out by scan");
    n_sj++;
  endtask

  task automatic functional_justification(input logic [3:0] pp1, input logic [2:0] ps1,
                                          input logic [3:0] pp2);
    logic [2:0] ps2, rs2, got;
    shift_in(OP_L2_SHIFT, ps1);
    #1 chk(st, ps1, "Ps1 in Latch 2");
    {test_mode, test_opt} = OP_NORMAL;
    pi = pp1;
    ps2 = s27_ns(pp1, ps1);
    #(SLOW/2 - 1) clock = 1'b1;   // slow period ends: launch
    n_norm++;
    #1 chk(st, ps2, "functional launch");
    pi = pp2;
    #(FAST/2 - 1) clock = 1'b0;
    rs2 = s27_ns(pp2, ps2);
    #(FAST/2) clock = 1'b1;       // functional period ends: capture
    n_norm++;
    #1 chk(st, rs2, "functional capture");
    #(SLOW/2 - 1) clock = 1'b0;
    shift_out(got);
    chk(got, rs2, "functional response read out");
    n_fj++;
  endtask

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL coverage: %s never happened", what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clock = 1'b0; test_mode = 1'b1; test_opt = 1'b0; scan_in = 1'b0;
    pi = '0; tgt_pi = '0; tgt_st = '0;
    // 1. Search for the inputs that justify '10X'.
    for (int v = 0; v < 128; v++) begin
      logic [2:0] ns;
      {tgt_st, tgt_pi} = 7'(v);
      #1;
      ns = s27_ns(tgt_pi, tgt_st);
      chk(tgt_hit, ns[1:0] == 2'b10, "target circuit hit");
      chk(tgt_ns, ns, "target circuit next state");
      chk(tgt_po, s27_eval(tgt_pi, tgt_st).g17, "target circuit output");
      if (tgt_hit) begin
        hits.push_back(7'(v));
        n_hits++;
      end
    end
    // 2. Scan justification for every justifying input and every Ps2.
    foreach (hits[h]) begin
      for (int p2 = 0; p2 < 8; p2++) begin
        scan_justification(hits[h][3:0], hits[h][6:4], 4'($urandom), 4'($urandom), 3'(p2));
      end
    end
    // 3. Functional justification on random patterns.
    repeat (50) functional_justification(4'($urandom), 3'($urandom), 4'($urandom));

    $display("justifying inputs=%0d scan-justification runs=%0d launches=%0d functional runs=%0d",
             n_hits, n_sj, n_launch, n_fj);
    $display("L3 shifts=%0d L2 shifts=%0d normal clocks=%0d clocking pulses=%0d",
             n_l3, n_l2, n_norm, n_clk);
    need(n_hits, "justifying input");
    need(n_l3, "L3-scan shifting");
    need(n_l2, "L2-scan shifting");
    need(n_norm, "normal operation clock");
    need(n_clk, "clocking mode");
    need(n_launch, "launched transition");
    need(n_sj, "scan-justification test");
    need(n_fj, "functional-justification test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
