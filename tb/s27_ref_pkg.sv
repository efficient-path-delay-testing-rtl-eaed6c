// s27_ref_pkg: testbench reference model of the S27 benchmark.
//
// A gate-by-gate evaluation of the published S27 netlist through small gate
// functions, kept apart from the RTL so that the testbenches compare the RTL
// with an independent description. Also holds the edge-level reference model
// of a chain of scan-justification flip-flops (slave and bypass values per
// cell) used by the chain, S27 and top testbenches.
package s27_ref_pkg;

  function automatic logic not1(input logic a);           return !a;          endfunction
  function automatic logic and2(input logic a, logic b);  return a && b;      endfunction
  function automatic logic or2 (input logic a, logic b);  return a || b;      endfunction
  function automatic logic nand2(input logic a, logic b); return !(a && b);   endfunction
  function automatic logic nor2(input logic a, logic b);  return !(a || b);   endfunction

  typedef struct packed {
    logic       g17;  // primary output
    logic       g13;  // next G7
    logic       g11;  // next G6
    logic       g10;  // next G5
  } s27_out_t;

  // pi = {G3, G2, G1, G0}, st = {G7, G6, G5}
  function automatic s27_out_t s27_eval(input logic [3:0] pi, input logic [2:0] st);
    logic g0, g1, g2, g3, g5, g6, g7;
    logic g8, g9, g12, g14, g15, g16;
    s27_out_t r;
    g0 = pi[0]; g1 = pi[1]; g2 = pi[2]; g3 = pi[3];
    g5 = st[0]; g6 = st[1]; g7 = st[2];
    g14   = not1(g0);
    g12   = nor2(g1, g7);
    g8    = and2(g14, g6);
    g15   = or2(g12, g8);
    g16   = or2(g3, g8);
    g9    = nand2(g16, g15);
    r.g11 = nor2(g5, g9);
    r.g17 = not1(r.g11);
    r.g10 = nor2(g14, r.g11);
    r.g13 = nor2(g2, g12);
    return r;
  endfunction

  // Next state in the RTL's order {G13, G11, G10}.
  function automatic logic [2:0] s27_ns(input logic [3:0] pi, input logic [2:0] st);
    s27_out_t r;
    r = s27_eval(pi, st);
    return {r.g13, r.g11, r.g10};
  endfunction

endpackage
