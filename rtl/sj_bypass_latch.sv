// sj_bypass_latch: Latch 3 of the scan flip-flop, the bypass of the slave.
//
// Latch 3 keeps the second-time-frame scan pattern (Ps2) while Latch 2 goes
// on working as the slave. It is transparent only while both CLKB (the
// buffered clock) and test_opt are high, i.e. in L3-scan shifting mode during
// the high clock phase; in every other case it holds. This is what lets
// test_opt serve as the clock in clocking mode (Clock low, test_opt high)
// without disturbing the stored value. The enable gating by CLKB and test_opt
// follows the switch labels of the cell; reducing the switches to one AND-ed
// enable is this design's reading of them.
//
// Interface: clkb, test_opt, d (output of Latch 1) -> q. Level sensitive.
// A latch is intended here; tools that report one are reporting the design.
module sj_bypass_latch (
  input  logic clkb,
  input  logic test_opt,
  input  logic d,
  output logic q
);

  logic en;

  always_comb en = clkb & test_opt;

  sj_latch u_l3 (
    .en (en),
    .d  (d),
    .q  (q)
  );

endmodule
