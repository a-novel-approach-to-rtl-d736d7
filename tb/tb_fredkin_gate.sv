// Self-checking testbench for fredkin_gate.
// Applies all eight input triples and checks the outputs against the
// controlled-swap truth table written out below, checks that the outputs are
// one-to-one, that the number of ones is conserved, and that a second gate
// applied to the outputs restores the inputs.
module tb_fredkin_gate;
  logic a, b, c, p, q, r, a2, b2, c2;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  fredkin_gate dut   (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  fredkin_gate dut_i (.a(p), .b(q), .c(r), .p(a2), .q(b2), .r(c2));

  // Expected {p,q,r} for input {a,b,c} = 0..7: swap b and c when a = 1.
  localparam logic [2:0] EXP [8] =
    '{3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b110, 3'b101, 3'b111};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== EXP[i]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", 3'(i), {p, q, r}, EXP[i]);
      end
      checks++;
      if ($countones({p, q, r}) != $countones(3'(i))) begin
        failures++;
        $display("FAIL ones not conserved for in=%b", 3'(i));
      end
      checks++;
      if ({a2, b2, c2} !== 3'(i)) begin
        failures++;
        $display("FAIL inverse in=%b back=%b", 3'(i), {a2, b2, c2});
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL outputs not one-to-one: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
