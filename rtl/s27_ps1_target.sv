// s27_ps1_target: S27 logic modified to search for a justifying input.
//
// To apply scan justification the first scan pattern Ps1 must come out of
// the circuit's own logic: some primary input Pp0 and scanned state Ps0 must
// drive the feedback lines to the required Ps1. The search is cast as a
// stuck-at-0 test: every feedback line that must be 1 goes straight into an
// AND gate, every line that must be 0 goes through an inverter first, lines
// that may be X are left out, and the primary output is not used. An input
// that sets the AND output to 1 tests stuck-at-0 on it and is a (Pp0, Ps0)
// that produces the required Ps1. Any stuck-at ATPG, or an exhaustive sweep
// for a circuit this small, finds it.
//
// The required pattern is given by two parameters in next-state order
// {G13, G11, G10}: CARE marks the lines that matter, VALUE their values.
// The defaults are the worked example, Ps1 = '10X' for (G11, G10, G13):
// G11 direct, G10 inverted, G13 unused.
//
// Interface: pi = {G3..G0} (Pp0), st = {G7, G6, G5} (Ps0) -> hit (AND gate
// output), ns (unmodified feedback lines), po (G17). Combinational.
module s27_ps1_target #(
  parameter logic [2:0] CARE  = 3'b011,
  parameter logic [2:0] VALUE = 3'b010
) (
  input  logic [3:0] pi,
  input  logic [2:0] st,
  output logic [2:0] ns,
  output logic       po,
  output logic       hit
);

  logic [2:0] and_in;

  s27_comb u_comb (
    .pi (pi),
    .st (st),
    .ns (ns),
    .po (po)
  );

  // Inserted inverters (value 0) and the lines left out of the AND (don't care).
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      if (!CARE[i])      and_in[i] = 1'b1;
      else if (VALUE[i]) and_in[i] = ns[i];
      else               and_in[i] = ~ns[i];
    end
    hit = &and_in;
  end

endmodule
