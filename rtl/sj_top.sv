// sj_top: S27 with scan-justification scan flip-flops, beside the modified
// S27 logic used to find the input that justifies a first test pattern.
//
// Two parts that are used at different times stand side by side:
//   - u_dut: the circuit under test (s27_sj). Its pins are the functional
//     pins G0..G3 / G17 plus the scan pins clock, test_mode, test_opt,
//     scan_in, scan_out. test_opt is a chip pin, as the method requires.
//     st shows the state lines seen by the logic, for observation.
//   - u_tgt: the search circuit (s27_ps1_target) for a required Ps1 given by
//     TGT_CARE / TGT_VALUE; tgt_hit = 1 means tgt_pi / tgt_st is a Pp0 / Ps0
//     that produces it; tgt_ns / tgt_po are the unmodified S27 outputs.
// No clock of its own: all timing comes from clock and test_opt.
//
// Lint and synthesis report a combinational loop from the state lines
// through s27_comb back into the cells. It runs through Latch 1 and through
// Latch 2 or Latch 3, which are never transparent at the same time (Latch 1
// on Clock low, the others on Clock high), so the loop is never closed.
module sj_top
#(
  parameter logic [2:0] TGT_CARE  = 3'b011,
  parameter logic [2:0] TGT_VALUE = 3'b010
) (
  input  logic clock,
  input  logic test_mode,
  input  logic test_opt,
  input  logic scan_in,
  input  logic [3:0] pi,
  output logic po,
  output logic scan_out,
  output logic [2:0] st,
  input  logic [3:0] tgt_pi,
  input  logic [2:0] tgt_st,
  output logic [2:0] tgt_ns,
  output logic tgt_po,
  output logic tgt_hit
);

  s27_sj u_dut (
    .clock     (clock),
    .test_mode (test_mode),
    .test_opt  (test_opt),
    .scan_in   (scan_in),
    .pi        (pi),
    .po        (po),
    .scan_out  (scan_out),
    .st        (st)
  );

  s27_ps1_target #(
    .CARE  (TGT_CARE),
    .VALUE (TGT_VALUE)
  ) u_tgt (
    .pi  (tgt_pi),
    .st  (tgt_st),
    .ns  (tgt_ns),
    .po  (tgt_po),
    .hit (tgt_hit)
  );

endmodule
