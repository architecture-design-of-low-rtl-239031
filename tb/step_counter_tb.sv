// step_counter_tb: random clr/inc sequences against a counting model; clr
// must win over inc and the count wraps at eight.
module step_counter_tb;
  logic clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [2:0] mn;
  int checks = 0, failures = 0, model = 0;
  always #5 clk = ~clk;
  step_counter dut (.*);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      clr = ($urandom_range(0, 9) == 0); inc = $urandom_range(0, 3) != 0;
      @(posedge clk);
      if (clr) model = 0; else if (inc) model = (model + 1) % 8;
      @(negedge clk);
      checks++;
      if (int'(mn) != model) begin failures++; $display("FAIL: mn %0d expected %0d", mn, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
