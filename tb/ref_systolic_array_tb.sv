// ref_systolic_array_tb: random lines shifted in with random directions and
// enables; after every cycle the array must equal a model that keeps a
// window of an unbounded picture: moving right brings in the column on the
// right, and so on.
module ref_systolic_array_tb;
  import ime_pkg::*;
  logic clk = 0, rst_n = 0, shift_en = 0; dir_t dir = DIR_DOWN;
  pix_t line_in[16], refp[16][16], model[16][16], nxt[16][16];
  int checks = 0, failures = 0, used[4] = '{0,0,0,0};
  always #5 clk = ~clk;
  ref_systolic_array dut (.*);
  initial begin
    for (int k = 0; k < 16; k++) line_in[k] = 0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) model[r][c] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      shift_en = $urandom_range(0, 4) != 0; dir = dir_t'($urandom_range(0, 3));
      for (int k = 0; k < 16; k++) line_in[k] = pix_t'($urandom);
      @(negedge clk);
      if (shift_en) begin
        used[dir]++;
        for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++)
          case (dir)
            DIR_DOWN:  nxt[r][c] = (r < 15) ? model[r+1][c] : line_in[c];
            DIR_UP:    nxt[r][c] = (r > 0)  ? model[r-1][c] : line_in[c];
            DIR_RIGHT: nxt[r][c] = (c < 15) ? model[r][c+1] : line_in[r];
            default:   nxt[r][c] = (c > 0)  ? model[r][c-1] : line_in[r];
          endcase
        model = nxt;
      end
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
        checks++;
        if (refp[r][c] != model[r][c]) begin failures++; $display("FAIL: t %0d [%0d][%0d]", t, r, c); end
      end
    end
    checks++;
    if (used[0] == 0 || used[1] == 0 || used[2] == 0 || used[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
