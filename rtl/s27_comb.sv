// s27_comb: combinational logic of the ISCAS'89 S27 benchmark circuit.
//
// S27 has four primary inputs G0..G3, one primary output G17 and three state
// flip-flops: G5 <= G10, G6 <= G11, G7 <= G13. This module is the logic
// between them, the example circuit on which the justification of a first
// test pattern is shown. Gate names and connections follow the benchmark;
// the gate functions are those of the standard S27 netlist:
//   G14 = NOT(G0)        G8  = AND(G14, G6)    G12 = NOR(G1, G7)
//   G15 = OR(G12, G8)    G16 = OR(G3, G8)      G9  = NAND(G16, G15)
//   G11 = NOR(G5, G9)    G10 = NOR(G14, G11)   G13 = NOR(G2, G12)
//   G17 = NOT(G11)
//
// Interface: pi = {G3, G2, G1, G0}; st = {G7, G6, G5} (present state);
// ns = {G13, G11, G10} (next state, bit i feeds st[i]); po = G17.
// Purely combinational.
module s27_comb (
  input  logic [3:0] pi,
  input  logic [2:0] st,
  output logic [2:0] ns,
  output logic       po
);

  logic g0, g1, g2, g3, g5, g6, g7;
  logic g8, g9, g10, g11, g12, g13, g14, g15, g16, g17;

  always_comb begin
    {g3, g2, g1, g0} = pi;
    {g7, g6, g5}     = st;
    g14 = ~g0;
    g8  = g14 & g6;
    g12 = ~(g1 | g7);
    g15 = g12 | g8;
    g16 = g3 | g8;
    g9  = ~(g16 & g15);
    g11 = ~(g5 | g9);
    g10 = ~(g14 | g11);
    g13 = ~(g2 | g12);
    g17 = ~g11;
    ns  = {g13, g11, g10};
    po  = g17;
  end

endmodule
