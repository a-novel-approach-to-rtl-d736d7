// Reversible JK flip-flop, positive-edge triggered, with asynchronous set and
// clear pins.
//
// The next state follows the JK characteristic equation
//   Q+ = J & ~Q | ~K & Q
// (J=K=0 hold, J=1/K=0 set, J=0/K=1 reset, J=K=1 toggle). It is formed, as in
// the reversible JK design, by a Fredkin gate whose control input is the fed
// back state Q: with Q=0 it routes J to its middle output, with Q=1 it routes
// the complement of K there. A Feynman gate with a constant-0 input copies
// the stored bit so that one copy can go to the outside and one back to the
// Fredkin gate, which a reversible circuit cannot do with a plain fan-out.
//
// In the reversible design a second Fredkin gate, controlled by the clock,
// closes the storage loop as a level-sensitive latch. Since the flip-flop is
// meant to act on the positive clock edge, this implementation keeps that
// loop as an edge-triggered register instead; that is this design's choice.
// The Fredkin gate's middle input is fed the complement of K, which the
// characteristic equation requires.
//
// Interface: clk (state changes only at its rising edge), set and clr
// (asynchronous, active high, clr wins when both are high), j, k, q and its
// complement q_n.
module jk_ff (
  input  logic clk,
  input  logic set,
  input  logic clr,
  input  logic j,
  input  logic k,
  output logic q,
  output logic q_n
);
  logic state;      // stored bit
  logic q_fb;       // copy of the stored bit fed back to the Fredkin gate
  logic q_next;     // next state from the Fredkin gate
  logic frg_p, frg_r;

  // Characteristic equation: control = Q selects between J and ~K.
  fredkin_gate u_frg (
    .a(q_fb), .b(j), .c(~k),
    .p(frg_p), .q(q_next), .r(frg_r)
  );

  // Copy of the stored bit: one to the outside, one as feedback.
  feynman_gate u_fg (
    .a(state), .b(1'b0),
    .p(q), .q(q_fb)
  );

  always_ff @(posedge clk or posedge clr or posedge set) begin
    if (clr)      state <= 1'b0;
    else if (set) state <= 1'b1;
    else          state <= q_next;
  end

  assign q_n = ~q;

  // frg_p and frg_r are the Fredkin gate's garbage outputs (the control bit
  // and the unselected input); they leave the gate unused.
  logic unused;
  assign unused = frg_p ^ frg_r;
endmodule
