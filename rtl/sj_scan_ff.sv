// sj_scan_ff: scan flip-flop for path delay testing by scan justification.
//
// A standard mux-scan master/slave flip-flop extended with a third latch and
// a second multiplexer:
//   - input mux, select test_mode: 0 = data_in, 1 = scan_in;
//   - Latch 1 (master), transparent while Clock is low (CLKA = ~Clock high);
//   - Latch 2 (slave), transparent while Clock is high (CLKB = Clock high);
//   - Latch 3 (bypass of the slave), also fed from Latch 1, transparent only
//     while Clock and test_opt are both high;
//   - output mux, select test_opt: 0 = Latch 2, 1 = Latch 3.
// data_out drives both the functional logic and the next cell's scan_in.
//
// Operation modes, {test_mode, test_opt}:
//   00 normal     positive-edge flip-flop on Clock (L1 -> L2, output L2)
//   01 clocking   Clock kept low; output switches to the Ps2 held in Latch 3
//                 while test_opt is high, Latch 1 captures the response;
//                 Clock then rises as test_opt falls, which closes Latch 1
//                 and moves the response into Latch 2
//   10 L2 shift   shift scan_in through L1 -> L2, Latch 3 holds
//   11 L3 shift   shift scan_in through L1 -> L3 (L2 follows as well)
//
// The cell structure, mode table and clocking rule follow the method; the
// clock phases of the two latches are read from the CLKA/CLKB switch labels
// and checked against the published waveforms. The cell is non-inverting
// from data_in to data_out (the buffering inverters of the physical cell
// cancel). It has no reset, like the cell it models.
//
// Rule checked by an assertion: in clocking mode Clock must stay low,
// otherwise Latch 3 would not hold Ps2. The end of clocking mode is tight
// the other way too: Clock must rise when test_opt falls. If test_opt fell
// first, the output would return to Latch 2 while Latch 1 is still open,
// and in a circuit Latch 1 would then capture the response to the old state.
// Latches are intended here; tools that report them are reporting the design.
module sj_scan_ff
  import sj_pkg::*;
(
  input  logic clock,
  input  logic test_mode,
  input  logic test_opt,
  input  logic data_in,
  input  logic scan_in,
  output logic data_out
);

  logic clka, clkb;   // the two clock phases of the buffered clock
  logic d1;           // input mux output
  logic q1, q2, q3;   // Latch 1, Latch 2, Latch 3

  always_comb begin
    clka = ~clock;
    clkb = ~clka;
  end

  always_comb d1 = test_mode ? scan_in : data_in;

  sj_latch u_latch1 (
    .en (clka),
    .d  (d1),
    .q  (q1)
  );

  sj_latch u_latch2 (
    .en (clkb),
    .d  (q1),
    .q  (q2)
  );

  sj_bypass_latch u_latch3 (
    .clkb     (clkb),
    .test_opt (test_opt),
    .d        (q1),
    .q        (q3)
  );

  always_comb data_out = test_opt ? q3 : q2;

  // Clocking rule: test_opt stands in for the clock, the real clock stays low.
  always_ff @(posedge clock) begin
    assert (decode_mode(test_mode, test_opt) != OP_CLOCKING)
      else $error("sj_scan_ff: Clock rose in clocking mode; Latch 3 loses Ps2");
  end

endmodule
