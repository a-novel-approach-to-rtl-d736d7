// Reversible binary up-counter with parallel load and concurrent clearance,
// second approach: clear acts on the CLR pins of the flip-flops.
//
// The counter holds WIDTH bits in WIDTH JK flip-flops (jk_ff). Counting and
// loading are as in the first approach: at each rising edge of clk, with
// load = 1 the counter takes d (J=d, K=~d), otherwise with inc = 1 it counts
// up by one (bit i toggles when all lower bits are 1), otherwise it holds.
// The difference is the clear: instead of reaching the flip-flops through
// their K inputs it drives their asynchronous CLR pins, so while clr is 1 all
// bits are 0 at once, without waiting for a clock edge, and load and inc are
// ignored. This removes the clear from the J/K logic, which is why this
// approach needs fewer gates. preset_n is asynchronous and active low and
// holds every bit at 1; clr wins when both are active. cout is 1 while the
// counter is all ones and the operation selected for the coming edge is an
// increment.
//
// Following the counter description: the controls and their priority, clear
// wired to the flip-flops' CLR pins, the active-low asynchronous preset, the
// carry out at all ones, and the default width of 4 bits (WIDTH may be 2 to
// 16). This design's own choices: clr active high (one passage of the
// description calls the clear active when 1, another says the outputs go to
// zero when it is 0; active high is used for both approaches), gating cout
// with the increment operation, and forming the J/K drive in ordinary logic
// rather than the reversible gate netlist, whose gate equations are not given.
module rev_counter_a2
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
    $error("rev_counter_a2: WIDTH must be between 2 and 16");
  end

  counter_op_e      op;       // operation seen from outside (cout)
  counter_op_e      sync_op;  // operation driven through J and K
  logic [WIDTH-1:0] j, k, q_n;
  logic [WIDTH-1:0] toggle;

  assign op      = decode_op(clr, load, inc);
  assign sync_op = decode_op(1'b0, load, inc);

  assign toggle[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_toggle
    assign toggle[i] = toggle[i-1] & q[i-1];
  end

  always_comb begin
    unique case (sync_op)
      OP_LOAD: begin j = d;      k = ~d;     end
      OP_INC:  begin j = toggle; k = toggle; end
      default: begin j = '0;     k = '0;     end
    endcase
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    jk_ff u_ff (
      .clk (clk),
      .set (~preset_n),
      .clr (clr),
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
