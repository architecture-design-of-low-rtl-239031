// pe_array_tb: random and extreme pixel pairs; every element must give the
// absolute difference.
module pe_array_tb;
  import ime_pkg::*;
  pix_t cur[16][16], refp[16][16], diff[16][16];
  int checks = 0, failures = 0;
  pe_array dut (.*);
  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
        cur[r][c]  = (t == 0) ? 8'd255 : (t == 1) ? 8'd0 : pix_t'($urandom);
        refp[r][c] = (t == 0) ? 8'd0 : (t == 1) ? 8'd255 : pix_t'($urandom);
      end
      #1;
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
        int d;
        d = int'(cur[r][c]) - int'(refp[r][c]);
        if (d < 0) d = -d;
        checks++;
        if (int'(diff[r][c]) != d) begin
          failures++; $display("FAIL: [%0d][%0d] %0d vs %0d", r, c, diff[r][c], d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
