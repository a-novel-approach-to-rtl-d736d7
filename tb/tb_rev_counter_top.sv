// End-to-end testbench for rev_counter_top at its default parameters.
// Phase 1 is a directed full counting cycle: clear, then 2^WIDTH increments,
// checking each value one clock after the increment, the carry out in the
// cycle before the wrap, and the return to zero. Phase 2 applies random
// controls at the falling edge and compares both counters with reference
// models after every rising edge; between edges it checks the difference
// between the approaches (the second clears at once, the first at the next
// edge), the asynchronous preset and the carry outs. The D flip-flop is
// driven with data that changes inside the clock period and must show the
// value sampled at the last rising edge. Each mechanism is counted and must
// happen at least once.
module tb_rev_counter_top;
  localparam int unsigned W = 4;

  logic         clk, preset_n, clr, load, inc, dff_d, dff_q;
  logic [W-1:0] d, q_a1, q_a2, m1, m2;
  logic         cout_a1, cout_a2, dff_m;
  int checks = 0, failures = 0;
  int n_hold, n_inc, n_load, n_load_inc, n_sync_clr, n_async_clr, n_clr_load;
  int n_wrap, n_preset, n_dff0, n_dff1;

  rev_counter_top dut (
    .clk, .preset_n, .clr, .load, .inc, .d,
    .q_a1, .cout_a1, .q_a2, .cout_a2, .dff_d, .dff_q
  );

  initial clk = 1'b0;
  always #10 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_q(input string what);
    checks++;
    if (q_a1 !== m1 || q_a2 !== m2) begin
      failures++;
      $display("FAIL %s: q_a1=%h exp=%h q_a2=%h exp=%h at %0t", what, q_a1, m1, q_a2, m2, $time);
    end
  endtask

  task automatic check_cout(input logic exp1, input logic exp2);
    checks++;
    if (cout_a1 !== exp1 || cout_a2 !== exp2) begin
      failures++;
      $display("FAIL cout_a1=%b exp=%b cout_a2=%b exp=%b at %0t", cout_a1, exp1, cout_a2, exp2, $time);
    end
  endtask

  // D flip-flop: data changes twice per period, output must hold the value
  // seen at the last rising edge.
  initial begin
    dff_d = 1'b0;
    forever begin
      @(posedge clk);
      dff_m = dff_d;
      #3;
      checks++;
      if (dff_q !== dff_m) begin
        failures++;
        $display("FAIL dff_q=%b exp=%b at %0t", dff_q, dff_m, $time);
      end
      if (dff_m) n_dff1++; else n_dff0++;
      dff_d = 1'($urandom);
      #4;
      checks++;
      if (dff_q !== dff_m) begin
        failures++;
        $display("FAIL dff_q changed inside the period at %0t", $time);
      end
      #6;
      dff_d = 1'($urandom);
    end
  end

  initial begin
    {n_hold, n_inc, n_load, n_load_inc, n_sync_clr, n_async_clr, n_clr_load} = '0;
    {n_wrap, n_preset, n_dff0, n_dff1} = '0;
    preset_n = 1'b1; load = 1'b0; inc = 1'b0; d = '0;

    // Phase 1: clear, then one full counting cycle.
    clr = 1'b1;
    @(posedge clk); #1;
    m1 = '0; m2 = '0;
    check_q("clear at start");
    @(negedge clk);
    clr = 1'b0; inc = 1'b1;
    for (int unsigned i = 1; i <= (1 << W); i++) begin
      #2;
      check_cout((i == (1 << W)), (i == (1 << W)));
      @(posedge clk); #1;
      m1 = W'(i); m2 = W'(i);
      n_inc++;
      check_q("full counting cycle");
      @(negedge clk);
    end
    n_wrap++;

    // Phase 2: random controls.
    for (int n = 0; n < 2000; n++) begin
      int r;
      if (n % 53 == 20) begin
        clr = 1'b0;
        preset_n = 1'b0; #1;
        m1 = '1; m2 = '1;
        check_q("asynchronous preset");
        preset_n = 1'b1; #1;
        check_q("hold after preset");
        n_preset++;
      end
      r = int'($urandom_range(99));
      clr  = (r < 8);
      load = (r >= 4 && r < 22);
      inc  = (r >= 16 && r < 85);
      d    = ($urandom_range(3) == 0) ? W'('1) - 1'b1 : W'($urandom);
      #1;
      if (clr) begin
        // Second approach clears at once; first approach waits for the edge.
        m2 = '0;
        check_q("clear between edges");
        if (m1 != '0) n_async_clr++;
      end
      #3;
      check_cout(!clr && !load && inc && m1 == '1, !clr && !load && inc && m2 == '1);
      if (!clr && !load && inc && m1 == '1) n_wrap++;
      @(posedge clk);
      if (clr) begin
        m1 = '0; m2 = '0;
        n_sync_clr++;
        if (load) n_clr_load++;
      end else if (load) begin
        m1 = d; m2 = d;
        n_load++;
        if (inc) n_load_inc++;
      end else if (inc) begin
        m1 = m1 + 1'b1; m2 = m2 + 1'b1;
        n_inc++;
      end else begin
        n_hold++;
      end
      #1;
      check_q("after rising edge");
      checks++;
      if (q_a1 !== q_a2) begin
        failures++;
        $display("FAIL approaches disagree after the edge: %h %h", q_a1, q_a2);
      end
      @(negedge clk);
    end

    begin
      int counts [11];
      string names [11];
      counts = '{n_hold, n_inc, n_load, n_load_inc, n_sync_clr, n_async_clr, n_clr_load,
                 n_wrap, n_preset, n_dff0, n_dff1};
      names  = '{"hold", "increment", "load", "load over inc", "clear at edge",
                 "clear between edges", "clear over load", "wrap with carry", "preset",
                 "dff captures 0", "dff captures 1"};
      for (int i = 0; i < 11; i++) begin
        checks++;
        $display("mechanism %-20s : %0d", names[i], counts[i]);
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
