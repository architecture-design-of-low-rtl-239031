// clock_gate_tb: checks the gated clock against the free clock.
// The enable is driven with random values, changed either while the clock is
// low (where it sets the next cycle) or while it is high (where it must not
// touch the current pulse). At 1-ns steps it checks that gclk equals clk
// when the enable sampled before the last rising edge was high, and that it
// is low otherwise, so that no pulse is cut short or appears late. Gated
// rising edges are counted and compared with the number of enabled cycles.
module clock_gate_tb;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int gated_edges = 0, enabled_cycles = 0, high_changes = 0;
  bit en_at_edge;

  clock_gate dut (.clk, .en, .gclk);

  always @(posedge gclk) gated_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    en_at_edge = 0;
    // clock period 10 ns: low 0..4, high 5..9
    for (int c = 0; c < 400; c++) begin
      // low phase: set the enable for this cycle
      #2 en = 1'($urandom_range(0, 1));
      #3;
      clk = 1'b1; en_at_edge = en;
      if (en) enabled_cycles++;
      // high phase: sometimes flip the enable in the middle of the pulse
      for (int t = 0; t < 5; t++) begin
        #1;
        check(gclk == en_at_edge, $sformatf("cycle %0d, %0d ns into the high phase: gclk %0b, enable at edge %0b",
                                             c, t + 1, gclk, en_at_edge));
        if (t == 2 && $urandom_range(0, 2) == 0) begin en = ~en; high_changes++; end
      end
      clk = 1'b0;
      #0;
      check(gclk == 1'b0, $sformatf("cycle %0d: gclk high while clk low", c));
    end
    check(gated_edges == enabled_cycles,
          $sformatf("%0d gated edges for %0d enabled cycles", gated_edges, enabled_cycles));
    check(high_changes > 20, $sformatf("only %0d enable changes in a high phase", high_changes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
