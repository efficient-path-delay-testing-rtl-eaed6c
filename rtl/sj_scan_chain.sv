// sj_scan_chain: the state register of a sequential circuit built from
// scan-justification scan flip-flops linked into one scan chain.
//
// Every cell shares Clock, test_mode and test_opt. Cell 0 takes scan_in, cell
// i takes the output of cell i-1, and the last cell's output is scan_out, so
// a bit shifted in first ends up in cell N-1. In normal and clocking modes
// cell i captures d[i]; q[i] is the value the cell presents to the
// combinational logic (Latch 2, or Latch 3 while test_opt is high).
// The chain as such is this design's composition of the cells; the number
// of cells defaults to the three state lines of S27.
//
// Timing: as sj_scan_ff, one bit per rising Clock edge in the shift modes.
module sj_scan_chain #(
  parameter int unsigned N = 3
) (
  input  logic         clock,
  input  logic         test_mode,
  input  logic         test_opt,
  input  logic         scan_in,
  input  logic [N-1:0] d,
  output logic [N-1:0] q,
  output logic         scan_out
);

  logic [N:0] chain;

  always_comb chain[0] = scan_in;

  for (genvar i = 0; i < N; i++) begin : g_cell
    sj_scan_ff u_ff (
      .clock     (clock),
      .test_mode (test_mode),
      .test_opt  (test_opt),
      .data_in   (d[i]),
      .scan_in   (chain[i]),
      .data_out  (q[i])
    );
    always_comb chain[i+1] = q[i];
  end

  always_comb scan_out = chain[N];

endmodule
