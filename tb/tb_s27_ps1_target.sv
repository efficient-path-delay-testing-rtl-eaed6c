// tb_s27_ps1_target: exhaustive check of the justification-target circuit.
//
// For the worked example (first pattern '10X' on G11, G10, G13) and for two
// further targets, every (pi, st) is applied: hit must be 1 exactly when the
// reference next state matches the target on the cared lines. At least one
// hit must exist for the worked example (a justifying Pp0/Ps0), and the
// search must find inputs with G13 both 0 and 1 (it is a don't care).
module tb_s27_ps1_target;
  import s27_ref_pkg::*;

  logic [3:0] pi;
  logic [2:0] st;
  logic [2:0] ns_a, ns_b, ns_c;
  logic       po_a, po_b, po_c;
  logic       hit_a, hit_b, hit_c;
  int checks = 0, failures = 0;
  int n_hit_a = 0, n_hit_b = 0, n_hit_c = 0, g13_one = 0, g13_zero = 0;

  localparam logic [2:0] CARE_B  = 3'b111, VALUE_B = 3'b101;
  localparam logic [2:0] CARE_C  = 3'b100, VALUE_C = 3'b000;

  // Default: the worked example.
  s27_ps1_target dut_a (.pi(pi), .st(st), .ns(ns_a), .po(po_a), .hit(hit_a));
  s27_ps1_target #(.CARE(CARE_B), .VALUE(VALUE_B))
    dut_b (.pi(pi), .st(st), .ns(ns_b), .po(po_b), .hit(hit_b));
  s27_ps1_target #(.CARE(CARE_C), .VALUE(VALUE_C))
    dut_c (.pi(pi), .st(st), .ns(ns_c), .po(po_c), .hit(hit_c));

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s pi=%b st=%b: got %b expected %b", what, pi, st, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] ns;
    for (int v = 0; v < 128; v++) begin
      {st, pi} = 7'(v);
      #1;
      ns = s27_ns(pi, st);
      // Worked example: G11 = 1, G10 = 0, G13 don't care.
      chk(hit_a, ns[1] == 1'b1 && ns[0] == 1'b0, "10X");
      chk(hit_b, (ns & CARE_B) == VALUE_B, "target B");
      chk(hit_c, (ns & CARE_C) == VALUE_C, "target C");
      chk(po_a, s27_eval(pi, st).g17, "po");
      checks++;
      if (ns_a !== ns) begin
        failures++;
        $display("FAIL ns pi=%b st=%b", pi, st);
      end
      if (hit_a) begin
        n_hit_a++;
        if (ns[2]) g13_one++; else g13_zero++;
      end
      if (hit_b) n_hit_b++;
      if (hit_c) n_hit_c++;
    end
    $display("justifying inputs: 10X=%0d (G13=1: %0d, G13=0: %0d) B=%0d C=%0d",
             n_hit_a, g13_one, g13_zero, n_hit_b, n_hit_c);
    checks++;
    if (n_hit_a == 0 || g13_one == 0 || g13_zero == 0) begin
      failures++;
      $display("FAIL the worked example has no justifying input for both G13 values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
