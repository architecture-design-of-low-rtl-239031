// cur_pel_buffer_tb: writes random rows in random order and checks the whole
// 16x16 output after each write (a row appears one cycle after its write,
// other rows keep their contents).
module cur_pel_buffer_tb;
  import ime_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0; logic [3:0] wr_row = 0;
  pix_t wr_data[16], cur[16][16], model[16][16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cur_pel_buffer dut (.*);
  initial begin
    for (int k = 0; k < 16; k++) wr_data[k] = 0;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) model[r][c] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      wr_en = $urandom_range(0, 3) != 0; wr_row = 4'($urandom);
      for (int k = 0; k < 16; k++) wr_data[k] = pix_t'($urandom);
      @(negedge clk);
      if (wr_en) for (int k = 0; k < 16; k++) model[wr_row][k] = wr_data[k];
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) begin
        checks++;
        if (cur[r][c] != model[r][c]) begin failures++; $display("FAIL: [%0d][%0d]", r, c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
