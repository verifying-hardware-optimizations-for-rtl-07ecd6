// covoh_pkg: types and constants shared by the case-study datapaths.
//
// The integer-level blocks of the designs (multiplier, adder, multiply-
// accumulate, polynomial evaluator, monitor) all work on 32-bit unsigned
// words, the data type used for the synthesized monitor. Arithmetic wraps
// modulo 2^32, as fixed-width unsigned hardware does; the unbounded natural
// numbers of the mathematical models are not representable in hardware.
package covoh_pkg;

  localparam int unsigned WORD_W = 32;

  typedef logic [WORD_W-1:0] word_t;

  // Associative operator S of the sliding-window monitor: the 32-bit
  // multiplier of the evaluated configuration, or the adder of a classic
  // running-sum temporal monitor.
  typedef enum logic {
    S_MUL = 1'b0,
    S_ADD = 1'b1
  } s_op_e;

  // Identity element of S, loaded into the monitor's delay registers.
  function automatic word_t s_identity(s_op_e op);
    return (op == S_MUL) ? word_t'(1) : word_t'(0);
  endfunction

endpackage : covoh_pkg
