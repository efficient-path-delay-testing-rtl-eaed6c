// sj_latch: level-sensitive D latch, the storage cell of the scan flip-flop.
//
// While en is high the latch is transparent (q follows d); while en is low it
// holds the last value. In the scan flip-flop it serves as Latch 1 (master,
// enabled by CLKA, the inverted clock) and as Latch 2 (slave, enabled by
// CLKB). The transistor-level latch is a transmission gate into an inverter
// loop; only its logic function is kept here. There is no reset, as in the
// original cell: the contents are defined by scanning or clocking data in.
//
// Interface: en, d -> q. No clock edge: q changes whenever en is high.
// A latch is intended here; tools that report one are reporting the design.
module sj_latch (
  input  logic en,
  input  logic d,
  output logic q
);

  always_latch begin
    if (en) q = d;
  end

endmodule
