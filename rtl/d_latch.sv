// Reversible D latch, the building block of the master-slave D flip-flop.
//
// While the enable input cp is 1 the latch is transparent and its output
// follows d; while cp is 0 it holds its value. In the reversible design this
// is a Fredkin gate controlled by cp, choosing between d and the fed-back
// output, followed by a Feynman gate with a constant-0 input that copies the
// result onto two outputs (one of them closes the feedback loop). Here the
// Fredkin gate's select-and-hold loop is written as a level-sensitive latch,
// and the Feynman gate provides the two copies q and q_copy.
//
// The latch that tools report for this module is intended: it is the storage
// element of the circuit.
module d_latch (
  input  logic cp,
  input  logic d,
  output logic q,
  output logic q_copy
);
  logic state;

  always_latch begin
    if (cp) state = d;
  end

  feynman_gate u_fg (
    .a(state), .b(1'b0),
    .p(q), .q(q_copy)
  );
endmodule
