// best_info_buffer_tb: random stores into the two slots, reading back every
// partition of both slots after each store, plus the valid flags.
module best_info_buffer_tb;
  import ime_pkg::*;
  logic clk = 0, rst_n = 0, store = 0, store_ref = 0, rd_ref = 0; logic [5:0] rd_part = 0;
  sad_t in_sad[41], rd_sad; mv_t in_mv[41], rd_mv; logic rd_valid;
  sad_t ms[2][41]; mv_t mm[2][41]; bit mv_ok[2] = '{0, 0};
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  best_info_buffer dut (.*);
  initial begin
    for (int p = 0; p < 41; p++) begin in_sad[p] = 0; in_mv[p] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      store = $urandom_range(0, 3) != 0; store_ref = 1'($urandom);
      for (int p = 0; p < 41; p++) begin in_sad[p] = sad_t'($urandom); in_mv[p] = mv_t'($urandom); end
      @(negedge clk);
      store = 0;
      for (int s = 0; s < 2; s++) for (int p = 0; p < 41; p++) begin
        rd_ref = s[0]; rd_part = 6'(p); #1;
        checks++;
        if (rd_valid != mv_ok[s] || (mv_ok[s] && (rd_sad != ms[s][p] || rd_mv != mm[s][p]))) begin
          failures++; $display("FAIL: t %0d slot %0d part %0d", t, s, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // model updated at the clock edge that stores
  always @(posedge clk) if (rst_n && store) begin
    mv_ok[store_ref] = 1;
    for (int p = 0; p < 41; p++) begin ms[store_ref][p] = in_sad[p]; mm[store_ref][p] = in_mv[p]; end
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
