// Workload testbench: wider counters built from 4-bit stages.
// Four 4-bit counters of each approach are chained into a 16-bit counter:
// clock, clear, load and preset are shared, stage 0 takes the external
// increment, and every further stage takes the carry out of the stage below
// as its increment. Random controls (loads biased to values just below a
// carry into the upper stages) are applied at the falling clock edge, and
// after each rising edge both chains are compared with a 16-bit reference
// model; the 8-bit value of the two lower stages is compared with an 8-bit
// model as well. Carries into each stage are counted and must occur.
module tb_rev_counter_cascade;
  localparam int unsigned STAGES = 4;

  logic                  clk, preset_n, clr, load, inc;
  logic [4*STAGES-1:0]   d, q1, q2, m;
  logic [STAGES:0]       c1, c2;   // c[s]: increment into stage s
  int checks = 0, failures = 0;
  int n_carry [STAGES];

  assign c1[0] = inc;
  assign c2[0] = inc;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    rev_counter_a1 u_a1 (.clk, .preset_n, .clr, .load, .inc(c1[s]),
                         .d(d[4*s +: 4]), .q(q1[4*s +: 4]), .cout(c1[s+1]));
    rev_counter_a2 u_a2 (.clk, .preset_n, .clr, .load, .inc(c2[s]),
                         .d(d[4*s +: 4]), .q(q2[4*s +: 4]), .cout(c2[s+1]));
  end

  initial clk = 1'b0;
  always #10 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_carry[s]) n_carry[s] = 0;
    preset_n = 1'b1; load = 1'b0; inc = 1'b0; d = '0; clr = 1'b1;
    @(posedge clk); #1;
    m = '0;
    @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      int r;
      r = int'($urandom_range(999));
      clr  = (r < 3);
      load = (r >= 3 && r < 15);
      inc  = (r >= 10 && r < 900);
      case ($urandom_range(3))
        0: d = 16'hFFF0 | 16'($urandom_range(15));
        1: d = 16'h00F0 | 16'($urandom_range(15));
        2: d = 16'h0FF0 | 16'($urandom_range(15));
        default: d = 16'($urandom);
      endcase
      #2;
      // Carry into the last stage: all lower 12 bits are ones during an increment.
      checks++;
      if (c1[STAGES] !== (!clr && !load && inc && m == '1) ||
          c2[STAGES] !== (!clr && !load && inc && m == '1)) begin
        failures++;
        $display("FAIL final carry %b %b for m=%h at %0t", c1[STAGES], c2[STAGES], m, $time);
      end
      for (int s = 1; s < STAGES; s++) if (c1[s]) n_carry[s]++;
      if (c1[STAGES]) n_carry[0]++;
      @(posedge clk);
      if (clr)       m = '0;
      else if (load) m = d;
      else if (inc)  m = m + 1'b1;
      #1;
      checks++;
      if (q1 !== m || q2 !== m) begin
        failures++;
        $display("FAIL 16-bit chain: a1=%h a2=%h exp=%h at %0t", q1, q2, m, $time);
      end
      @(negedge clk);
    end
    for (int s = 0; s < STAGES; s++) begin
      checks++;
      $display("carries %s %0d : %0d", s == 0 ? "out of stage" : "into stage",
               s == 0 ? STAGES - 1 : s, n_carry[s]);
      if (n_carry[s] == 0) begin
        failures++;
        $display("FAIL no carry at position %0d", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
