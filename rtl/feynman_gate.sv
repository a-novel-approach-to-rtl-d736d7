// Feynman gate (FG), the 2x2 reversible controlled-NOT.
//
// Outputs: p = a, q = a ^ b. The mapping is its own inverse, so every output
// pair identifies exactly one input pair. With b tied to 0 the gate copies a
// onto both outputs, which is how the flip-flops below fan out their state
// bit; with b tied to 1 it gives a and its complement.
//
// Purely combinational, no timing. The gate's truth table is the standard
// one from the reversible-logic literature; the counter description names
// the gate and gives its quantum cost (1) but not its equations.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
