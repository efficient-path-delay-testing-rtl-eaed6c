// tb_sj_scan_chain_large: the scan-justification sequence on chains as long
// as the state registers of the larger ISCAS'89 benchmarks (6 cells as in
// s1494, 597 as in s15850, 669 as in s13207).
//
// Only the chain is exercised; the logic around it is replaced by a random
// next-state vector on d. Per chain: Ps2 is shifted into Latch 3, Ps0 into
// Latch 2 (q must show Ps0), one normal-mode period captures d (q = d), test_opt
// high with Clock low must show Ps2 on every cell, Clock rising as test_opt
// falls captures the response on d, and an L2 shift reads it out bit by bit
// on scan_out. Shift cycles per pattern are counted and must equal N.
module tb_sj_scan_chain_large;
  import sj_pkg::*;

  localparam int NA = 6;
  localparam int NB = 597;
  localparam int NC = 669;

  logic clock, test_mode, test_opt, scan_in;
  int checks = 0, failures = 0;

  logic [NA-1:0] da, qa; logic soa;
  logic [NB-1:0] db, qb; logic sob;
  logic [NC-1:0] dc, qc; logic soc;

  sj_scan_chain #(.N(NA)) ua (.clock(clock), .test_mode(test_mode), .test_opt(test_opt),
                              .scan_in(scan_in), .d(da), .q(qa), .scan_out(soa));
  sj_scan_chain #(.N(NB)) ub (.clock(clock), .test_mode(test_mode), .test_opt(test_opt),
                              .scan_in(scan_in), .d(db), .q(qb), .scan_out(sob));
  sj_scan_chain #(.N(NC)) uc (.clock(clock), .test_mode(test_mode), .test_opt(test_opt),
                              .scan_in(scan_in), .d(dc), .q(qc), .scan_out(soc));

  task automatic tick();
    #5 clock = 1'b1;
    #5 clock = 1'b0;
  endtask

  function automatic logic [NC-1:0] rand_vec();
    logic [NC-1:0] v;
    for (int i = 0; i < NC; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  // Run the sequence on one chain, selected by which (0, 1, 2).
  task automatic run(input int which, input int n);
    logic [NC-1:0] ps2, ps0, rs1, rs2, got, q;
    int shifts;
    ps2 = rand_vec(); ps0 = rand_vec(); rs1 = rand_vec(); rs2 = rand_vec();
    // L3 shift of Ps2, then L2 shift of Ps0: bit n-1 first.
    {test_mode, test_opt} = OP_L3_SHIFT;
    for (int k = n - 1; k >= 0; k--) begin scan_in = ps2[k]; tick(); end
    {test_mode, test_opt} = OP_L2_SHIFT;
    shifts = 0;
    for (int k = n - 1; k >= 0; k--) begin scan_in = ps0[k]; tick(); shifts++; end
    checks++;
    if (shifts != n) begin failures++; $display("FAIL shift count %0d for N=%0d", shifts, n); end
    #1 q = (which == 0) ? NC'(qa) : (which == 1) ? NC'(qb) : qc;
    cmp(q, ps0, n, "Ps0 in Latch 2");
    // Normal mode: capture the vector on d.
    {test_mode, test_opt} = OP_NORMAL;
    da = rs1[NA-1:0]; db = rs1[NB-1:0]; dc = rs1;
    tick();
    #1 q = (which == 0) ? NC'(qa) : (which == 1) ? NC'(qb) : qc;
    cmp(q, rs1, n, "normal capture");
    // Clocking mode: Ps2 appears, the response on d is captured.
    {test_mode, test_opt} = OP_CLOCKING;
    da = rs2[NA-1:0]; db = rs2[NB-1:0]; dc = rs2;
    #1 q = (which == 0) ? NC'(qa) : (which == 1) ? NC'(qb) : qc;
    cmp(q, ps2, n, "Ps2 launched from Latch 3");
    #9 test_opt = 1'b0;
    clock = 1'b1;
    #5 clock = 1'b0;
    #1 q = (which == 0) ? NC'(qa) : (which == 1) ? NC'(qb) : qc;
    cmp(q, rs2, n, "clocking-mode capture");
    // Read out.
    {test_mode, test_opt} = OP_L2_SHIFT;
    for (int k = n - 1; k >= 0; k--) begin
      got[k] = (which == 0) ? soa : (which == 1) ? sob : soc;
      scan_in = 1'b0;
      tick();
    end
    cmp(got, rs2, n, "scan-out");
  endtask

  task automatic cmp(input logic [NC-1:0] got, input logic [NC-1:0] exp, input int n,
                     input string what);
    logic [NC-1:0] mask;
    mask = (n == NC) ? '1 : ((NC'(1) << n) - 1);
    checks++;
    if (((got ^ exp) & mask) != '0) begin
      failures++;
      $display("FAIL N=%0d %s", n, what);
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
    clock = 1'b0; scan_in = 1'b0; {test_mode, test_opt} = OP_L2_SHIFT;
    da = '0; db = '0; dc = '0;
    #2;
    repeat (2) begin
      run(0, NA);
      run(1, NB);
      run(2, NC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
