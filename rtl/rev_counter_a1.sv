// Reversible binary up-counter with parallel load and concurrent clearance,
// first approach: clear acts through the J and K inputs of the flip-flops.
//
// The counter holds WIDTH bits in WIDTH JK flip-flops (jk_ff). At each rising
// edge of clk it performs one operation, chosen by rev_counter_pkg::decode_op:
//   clr = 1                  all bits to 0 (synchronous: J=0, K=1 everywhere)
//   clr = 0, load = 1        q <= d (J=d, K=~d), whatever inc is
//   clr = 0, load = 0, inc=1 q <= q + 1, wrapping from all ones to 0
//                            (bit i toggles, J=K=1, when all lower bits are 1)
//   all 0                    no change
// preset_n is asynchronous and active low: while it is 0 every flip-flop is
// held at 1 through its SET pin, without a clock. cout is 1 while the counter
// is all ones and the operation selected for the coming edge is an increment,
// so it marks the cycle in which the counter wraps; it can drive the inc input
// of a further counter stage to build wider counters.
//
// Following the counter description: the three controls and their priority,
// the synchronous clear through the K inputs, the active-low asynchronous
// preset, the carry out at all ones, and the default width of 4 bits (WIDTH
// may be 2 to 16). This design's own choices: gating cout with the increment
// operation, and forming the J/K drive in ordinary logic. The described
// circuit forms it from reversible gates whose equations are not given, so
// that gate netlist is not reproduced here.
module rev_counter_a1
  import rev_counter_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             preset_n,
  input  logic             clr,
  input  logic             load,
  input  logic             inc,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             cout
);
  if (WIDTH < 2 || WIDTH > 16) begin : g_width_check
    $error("rev_counter_a1: WIDTH must be between 2 and 16");
  end

  counter_op_e      op;
  logic [WIDTH-1:0] j, k, q_n;
  logic [WIDTH-1:0] toggle;   // toggle[i]: all bits below i are 1

  assign op = decode_op(clr, load, inc);

  assign toggle[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_toggle
    assign toggle[i] = toggle[i-1] & q[i-1];
  end

  always_comb begin
    unique case (op)
      OP_CLEAR: begin j = '0;     k = '1;     end
      OP_LOAD:  begin j = d;      k = ~d;     end
      OP_INC:   begin j = toggle; k = toggle; end
      default:  begin j = '0;     k = '0;     end
    endcase
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    jk_ff u_ff (
      .clk (clk),
      .set (~preset_n),
      .clr (1'b0),
      .j   (j[i]),
      .k   (k[i]),
      .q   (q[i]),
      .q_n (q_n[i])
    );
  end

  assign cout = (op == OP_INC) && (&q);

  logic unused;
  assign unused = ^q_n;
endmodule
