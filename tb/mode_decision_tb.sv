// mode_decision_tb: random candidates with random (often equal) SADs; the
// buffer must hold per partition the minimum by (SAD, y, x), be emptied by
// clear, and forward each candidate's 16x16 SAD and MV one cycle later.
module mode_decision_tb;
  import ime_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, cand_valid = 0; mv_t cand_mv = '0;
  sad_t sad[41], best_sad[41]; mv_t best_mv[41];
  logic res_valid; sad_t res_sad16; mv_t res_mv;
  int ms[41], mx[41], my[41];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mode_decision dut (.*);
  task automatic reset_model();
    for (int p = 0; p < 41; p++) begin ms[p] = 65535; mx[p] = 0; my[p] = 0; end
  endtask
  initial begin
    for (int p = 0; p < 41; p++) sad[p] = 0;
    reset_model();
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      clear = ($urandom_range(0, 60) == 0); cand_valid = $urandom_range(0, 3) != 0;
      cand_mv = '{x: coord_t'($urandom_range(0, 8)) - 8'sd4, y: coord_t'($urandom_range(0, 6)) - 8'sd3};
      for (int p = 0; p < 41; p++) sad[p] = sad_t'($urandom_range(100, 140));
      @(negedge clk);
      if (clear) reset_model();
      else if (cand_valid)
        for (int p = 0; p < 41; p++)
          if (int'(sad[p]) < ms[p] || (int'(sad[p]) == ms[p] &&
              (int'(cand_mv.y) < my[p] || (int'(cand_mv.y) == my[p] && int'(cand_mv.x) < mx[p])))) begin
            ms[p] = int'(sad[p]); mx[p] = int'(cand_mv.x); my[p] = int'(cand_mv.y);
          end
      checks++;
      if (res_valid != (cand_valid && !clear) || (cand_valid && (res_sad16 != sad[0] || res_mv != cand_mv))) begin
        failures++; $display("FAIL: forwarded result at %0d", t);
      end
      for (int p = 0; p < 41; p++) begin
        checks++;
        if (int'(best_sad[p]) != ms[p] || (ms[p] != 65535 && (int'(best_mv[p].x) != mx[p] || int'(best_mv[p].y) != my[p]))) begin
          failures++; $display("FAIL: t %0d part %0d", t, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
