// sj_pkg: shared types for the scan-justification scan flip-flop.
//
// The two test pins of the flip-flop, test_mode and test_opt, select one of
// four operation modes. The encoding {test_mode, test_opt} below is the
// table of modes as the method defines it; the enum names are this design's.
package sj_pkg;

  // {test_mode, test_opt}
  typedef enum logic [1:0] {
    OP_NORMAL   = 2'b00,  // normal operation: master/slave flip-flop on Clock
    OP_CLOCKING = 2'b01,  // clocking: test_opt acts as the clock, Clock held low
    OP_L2_SHIFT = 2'b10,  // scan shifting with Latch 2 as the slave
    OP_L3_SHIFT = 2'b11   // scan shifting with Latch 3 as the slave
  } op_mode_e;

  function automatic op_mode_e decode_mode(input logic test_mode, input logic test_opt);
    return op_mode_e'({test_mode, test_opt});
  endfunction

endpackage
