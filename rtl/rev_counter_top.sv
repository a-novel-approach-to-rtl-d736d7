// Top level: the two reversible counter designs side by side, plus the
// reversible master-slave D flip-flop.
//
// Both counters (rev_counter_a1, clear through the J/K inputs; rev_counter_a2,
// clear on the flip-flops' CLR pins) share the clock and all control and data
// inputs, so their outputs can be compared cycle by cycle: they agree on
// every edge, and differ only while clr is 1 between edges, where the second
// approach has already gone to zero and the first waits for the next rising
// edge. The D flip-flop is the other storage element of the reversible
// family; it takes its own data input and uses the same clock.
//
// Ports: clk; preset_n (asynchronous, active low); clr, load, inc (sampled at
// the rising edge, priority clr > load > inc); d, the parallel-load data;
// q_a1/cout_a1 and q_a2/cout_a2, the two counters' outputs and carries;
// dff_d and dff_q, the D flip-flop's data in and out. WIDTH defaults to the
// 4 bits of the described counters.
module rev_counter_top #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             preset_n,
  input  logic             clr,
  input  logic             load,
  input  logic             inc,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q_a1,
  output logic             cout_a1,
  output logic [WIDTH-1:0] q_a2,
  output logic             cout_a2,
  input  logic             dff_d,
  output logic             dff_q
);
  rev_counter_a1 #(.WIDTH(WIDTH)) u_counter_a1 (
    .clk, .preset_n, .clr, .load, .inc, .d,
    .q(q_a1), .cout(cout_a1)
  );

  rev_counter_a2 #(.WIDTH(WIDTH)) u_counter_a2 (
    .clk, .preset_n, .clr, .load, .inc, .d,
    .q(q_a2), .cout(cout_a2)
  );

  logic dff_q_n;
  d_ff u_dff (
    .clk(clk), .d(dff_d),
    .q(dff_q), .q_n(dff_q_n)
  );

  logic unused;
  assign unused = dff_q_n;
endmodule
