// tb_s27_comb: exhaustive check of the S27 combinational logic against the
// reference netlist evaluation, all 2^7 input / state combinations.
module tb_s27_comb;
  import s27_ref_pkg::*;

  logic [3:0] pi;
  logic [2:0] st, ns;
  logic       po;
  int checks = 0, failures = 0;
  s27_out_t exp;

  s27_comb dut (.pi(pi), .st(st), .ns(ns), .po(po));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      {st, pi} = 7'(v);
      #1;
      exp = s27_eval(pi, st);
      checks++;
      if (ns !== {exp.g13, exp.g11, exp.g10} || po !== exp.g17) begin
        failures++;
        $display("FAIL pi=%b st=%b: ns=%b po=%b expected ns=%b po=%b",
                 pi, st, ns, po, {exp.g13, exp.g11, exp.g10}, exp.g17);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
