// Self-checking testbench for d_ff, the master-slave D flip-flop.
// The data input is changed several times within each clock period, while
// clk is high and while it is low. The output must show the value d had at
// the last rising edge, at every sampling point in the period: a change of d
// while the clock is high must not pass through, nor one while it is low.
module tb_d_ff;
  logic clk = 1'b0, d, q, q_n;
  logic captured;
  int checks = 0, failures = 0;

  d_ff dut (.clk, .d, .q, .q_n);

  always #10 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (q !== captured || q_n !== ~captured) begin
      failures++;
      $display("FAIL %s: q=%b q_n=%b exp=%b at %0t", what, q, q_n, captured, $time);
    end
  endtask

  initial begin
    d = 1'b0;
    @(posedge clk);
    captured = d;
    for (int n = 0; n < 300; n++) begin
      #2;  check("after rising edge");
      d = 1'($urandom);
      #3;  check("d changed, clock high");
      d = ~d;
      #4;  check("d toggled, clock high");
      @(negedge clk);
      #2;  check("after falling edge");
      d = 1'($urandom);
      #5;  check("d changed, clock low");
      @(posedge clk);
      captured = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
