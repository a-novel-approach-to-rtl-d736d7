// Self-checking testbench for feynman_gate.
// Applies all four input pairs, checks each output against the controlled-NOT
// truth table written out below, checks that the four output pairs are all
// different (the gate is reversible), and that a second gate applied to the
// outputs restores the inputs (the gate is its own inverse).
module tb_feynman_gate;
  logic a, b, p, q, a2, b2;
  int checks = 0, failures = 0;
  logic [3:0] seen;

  feynman_gate dut   (.a(a), .b(b), .p(p), .q(q));
  feynman_gate dut_i (.a(p), .b(q), .p(a2), .q(b2));

  // Expected {p,q} for input {a,b} = 00, 01, 10, 11.
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== EXP[i]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 2'(i), {p, q}, EXP[i]);
      end
      checks++;
      if ({a2, b2} !== 2'(i)) begin
        failures++;
        $display("FAIL inverse in=%b back=%b", 2'(i), {a2, b2});
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hF) begin
      failures++;
      $display("FAIL outputs not one-to-one: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
