// Self-checking testbench for jk_ff.
// Random J/K values are applied at the falling clock edge and the output is
// compared after each rising edge with a reference model of the JK table
// (hold, reset, set, toggle). The asynchronous pins are exercised between
// edges: set and clr must act at once, without a clock edge, clr winning over
// set, and the flip-flop must keep the forced value until the next edge.
module tb_jk_ff;
  logic clk = 1'b0, set, clr, j, k, q, q_n;
  logic model;
  int checks = 0, failures = 0;
  int cnt_jk [4];

  jk_ff dut (.clk, .set, .clr, .j, .k, .q, .q_n);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp || q_n !== ~exp) begin
      failures++;
      $display("FAIL %s: q=%b q_n=%b exp=%b at %0t", what, q, q_n, exp, $time);
    end
  endtask

  initial begin
    set = 1'b0; clr = 1'b1; j = 1'b0; k = 1'b0;
    #2;
    model = 1'b0;
    check(model, "async clear at start");
    clr = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // Occasionally pulse an asynchronous pin in the low half of the clock.
      if (n % 17 == 5) begin
        set = 1'b1; #1; model = 1'b1; check(model, "async set");
        set = 1'b0; #1; check(model, "hold after set");
      end else if (n % 17 == 11) begin
        clr = 1'b1; #1; model = 1'b0; check(model, "async clear");
        clr = 1'b0; #1; check(model, "hold after clear");
      end else if (n % 17 == 14) begin
        set = 1'b1; clr = 1'b1; #1; model = 1'b0; check(model, "clear over set");
        set = 1'b0; clr = 1'b0; #1;
      end
      j = 1'($urandom); k = 1'($urandom);
      cnt_jk[{j, k}]++;
      @(posedge clk);
      case ({j, k})
        2'b00: model = model;
        2'b01: model = 1'b0;
        2'b10: model = 1'b1;
        2'b11: model = ~model;
      endcase
      #1;
      check(model, "clocked JK");
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (cnt_jk[i] == 0) begin
        failures++;
        $display("FAIL JK combination %0d never applied", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
