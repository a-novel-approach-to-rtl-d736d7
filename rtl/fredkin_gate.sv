// Fredkin gate (FRG), the 3x3 reversible controlled swap.
//
// The control input a passes straight through to p. When a is 0, b and c pass
// to q and r unchanged; when a is 1 they are swapped:
//   p = a,  q = ~a&b | a&c,  r = ~a&c | a&b.
// The gate is its own inverse and conserves the number of ones.
//
// Purely combinational, no timing. The truth table is the standard one from
// the reversible-logic literature; the counter description names the gate
// and gives its quantum cost (5) but not its equations.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
