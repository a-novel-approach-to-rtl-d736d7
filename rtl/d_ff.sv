// Reversible D flip-flop, positive-edge triggered, built as master and slave.
//
// Two reversible D latches (d_latch) are chained. The master is transparent
// while clk is 0 and follows d; the slave is transparent while clk is 1 and
// passes on what the master held at the rising edge. The output q therefore
// takes the value d had at the rising clock edge and keeps it for one full
// clock period. q_n is the complement.
//
// The master-slave structure and the positive-edge behaviour follow the
// reversible D flip-flop description; the clock polarity of each latch is
// this design's choice to obtain that edge. There is no reset: the state is
// unknown until the first rising edge.
//
// The two latches that tools report here are intended: they are the master
// and the slave stage.
module d_ff (
  input  logic clk,
  input  logic d,
  output logic q,
  output logic q_n
);
  logic master_q, master_copy;
  logic slave_copy;

  d_latch u_master (
    .cp(~clk), .d(d),
    .q(master_q), .q_copy(master_copy)
  );

  d_latch u_slave (
    .cp(clk), .d(master_q),
    .q(q), .q_copy(slave_copy)
  );

  assign q_n = ~slave_copy;

  // The master's second copy is a garbage output of its Feynman gate.
  logic unused;
  assign unused = master_copy;
endmodule
