// s27_sj: the S27 benchmark with its state flip-flops built as
// scan-justification scan flip-flops.
//
// The three state lines G5, G6, G7 are held in one scan chain of sj_scan_ff
// cells, fed by the next-state lines G10, G11, G13 of s27_comb. The chain
// order is G5 (cell 0, nearest scan_in), G6, G7 (cell 2, drives scan_out);
// this order is this design's choice. Delay tests are applied with the
// sequence of the method: Ps2 scanned into Latch 3 (L3 shift), Ps0 scanned
// into Latch 2 (L2 shift), one slow Clock period in normal mode that brings
// Ps1 onto the state lines, a second slow period with Clock low in which
// (Pp1, Ps1) initialises the circuit, a test_opt pulse of one functional
// clock period in clocking mode that launches Ps1 -> Ps2 and captures Rs2,
// Clock rising as test_opt falls, and an L2 shift to read Rs2 out. Reading
// the second slow period as "Clock stays low" is this design's: a second
// rising edge would replace Ps1 by the response Rs1 before the launch.
//
// Interface: clock, test_mode, test_opt, scan_in; pi = {G3..G0}; po = G17;
// scan_out; st = {G7, G6, G5} as seen by the logic (for observation).
//
// Lint and synthesis report a combinational loop from the state lines
// through s27_comb back into the cells. It runs through Latch 1 and through
// Latch 2 or Latch 3, which are never transparent at the same time (Latch 1
// on Clock low, the others on Clock high), so the loop is never closed.
module s27_sj
(
  input  logic clock,
  input  logic test_mode,
  input  logic test_opt,
  input  logic scan_in,
  input  logic [3:0] pi,
  output logic po,
  output logic scan_out,
  output logic [2:0] st
);

  logic [2:0] ns;

  s27_comb u_comb (
    .pi (pi),
    .st (st),
    .ns (ns),
    .po (po)
  );

  sj_scan_chain #(.N(3)) u_chain (
    .clock     (clock),
    .test_mode (test_mode),
    .test_opt  (test_opt),
    .scan_in   (scan_in),
    .d         (ns),
    .q         (st),
    .scan_out  (scan_out)
  );

endmodule
