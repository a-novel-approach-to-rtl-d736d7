// Self-checking testbench for rev_counter_a1.
// Two counters are driven with the same controls: one at the default width of
// 4 bits and one at 8 bits (data widened with random upper bits). Random
// controls are applied at the falling clock edge and, after each rising edge,
// the outputs are compared with a reference model of the counter's table:
// clear, else load, else increment (mod 2^WIDTH), else hold. The carry out is
// checked just before each rising edge: it must be 1 exactly when an
// increment is selected and the model is all ones. The asynchronous preset
// is pulsed between edges and must set every bit at once.
// The clear is synchronous in this approach: a clear applied between edges must leave the outputs alone until the next rising edge.
// Every mechanism (hold, increment, load, load with increment, clear, clear
// with load, wrap with carry out, preset) is counted and must occur.
module tb_rev_counter_a1;
  import rev_counter_pkg::*;

  logic       clk, preset_n, clr, load, inc;
  logic [7:0] d;
  logic [3:0] q4;
  logic [7:0] q8;
  logic       cout4, cout8;
  logic [3:0] m4;
  logic [7:0] m8;
  int checks = 0, failures = 0;
  int n_hold, n_inc, n_load, n_load_inc, n_clr, n_clr_load, n_wrap4, n_wrap8, n_preset;

  rev_counter_a1 dut4 (.clk, .preset_n, .clr, .load, .inc, .d(d[3:0]), .q(q4), .cout(cout4));
  rev_counter_a1 #(.WIDTH(8)) dut8 (.clk, .preset_n, .clr, .load, .inc, .d(d), .q(q8), .cout(cout8));

  initial clk = 1'b0;
  always #10 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_q(input string what);
    checks++;
    if (q4 !== m4 || q8 !== m8) begin
      failures++;
      $display("FAIL %s: q4=%h exp=%h q8=%h exp=%h at %0t", what, q4, m4, q8, m8, $time);
    end
  endtask

  initial begin
    {n_hold, n_inc, n_load, n_load_inc, n_clr, n_clr_load, n_wrap4, n_wrap8, n_preset} = '0;
    preset_n = 1'b1; clr = 1'b0; load = 1'b1; inc = 1'b0; d = 8'hF0;
    @(posedge clk); #1;
    m4 = 4'h0; m8 = 8'hF0;
    check_q("initial load");
    load = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int r;
      @(negedge clk);
      if (n % 97 == 40) begin
        preset_n = 1'b0; #1;
        m4 = '1; m8 = '1;
        check_q("asynchronous preset");
        preset_n = 1'b1; #1;
        check_q("hold after preset");
        n_preset++;
      end
      r = int'($urandom_range(99));
      clr  = (r < 6);
      load = (r >= 3 && r < 20);
      inc  = (r >= 15 && r < 85);
      d    = ($urandom_range(3) == 0) ? 8'hFE : 8'($urandom);
      #1;
      if (clr) begin
        check_q("no clear before the edge");
      end
      #3;
      checks++;
      if (cout4 !== (!clr && !load && inc && m4 == '1) ||
          cout8 !== (!clr && !load && inc && m8 == '1)) begin
        failures++;
        $display("FAIL cout4=%b cout8=%b m4=%h m8=%h clr=%b load=%b inc=%b",
                 cout4, cout8, m4, m8, clr, load, inc);
      end
      if (cout4) n_wrap4++;
      if (cout8) n_wrap8++;
      @(posedge clk);
      if (clr) begin
        m4 = '0; m8 = '0;
        n_clr++;
        if (load) n_clr_load++;
      end else if (load) begin
        m4 = d[3:0]; m8 = d;
        n_load++;
        if (inc) n_load_inc++;
      end else if (inc) begin
        m4 = m4 + 1'b1; m8 = m8 + 1'b1;
        n_inc++;
      end else begin
        n_hold++;
      end
      #1;
      check_q("after rising edge");
    end
    begin
      int counts [9];
      string names [9];
      counts = '{n_hold, n_inc, n_load, n_load_inc, n_clr, n_clr_load, n_wrap4, n_wrap8, n_preset};
      names  = '{"hold", "increment", "load", "load with inc", "clear", "clear with load",
                 "wrap 4-bit", "wrap 8-bit", "preset"};
      for (int i = 0; i < 9; i++) begin
        checks++;
        $display("mechanism %-16s : %0d", names[i], counts[i]);
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %s never happened", names[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
