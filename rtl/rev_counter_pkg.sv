// Shared types for the reversible 4-bit counter with parallel load and
// concurrent clearance.
//
// The counter obeys one operation per rising clock edge, chosen from its
// three control inputs with a fixed priority: clear over load over increment,
// and no change when none of them is active. The priority follows the
// counter's function description; the encoding of the enum is this design's
// own choice and is only used to name the operation in the RTL and in the
// testbenches.
package rev_counter_pkg;

  // Operation performed at the next rising clock edge.
  typedef enum logic [1:0] {
    OP_HOLD  = 2'd0,  // no control input active: outputs keep their value
    OP_INC   = 2'd1,  // count up by one, wrapping from all-ones to zero
    OP_LOAD  = 2'd2,  // parallel load of the data inputs
    OP_CLEAR = 2'd3   // all flip-flops to zero
  } counter_op_e;

  // Clear wins over load and increment; load wins over increment.
  function automatic counter_op_e decode_op(input logic clr, input logic load,
                                            input logic inc);
    if (clr)       return OP_CLEAR;
    else if (load) return OP_LOAD;
    else if (inc)  return OP_INC;
    else           return OP_HOLD;
  endfunction

endpackage
