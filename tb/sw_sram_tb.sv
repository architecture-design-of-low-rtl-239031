// sw_sram_tb: fills the 80x48 window with random pixels through the write
// port, then reads random horizontal and vertical 16-pixel lines at any
// position, giving each bank the word of the ladder layout (pixel (x, y) in
// bank (x + y) mod 16, word y * 5 + x / 16). Every line must come back in
// order one cycle after the read.
module sw_sram_tb;
  import ime_pkg::*;
  localparam int W = 80, H = 48;
  logic clk = 0, rst_n = 0, rd_en = 0, wr_en = 0;
  logic [7:0] rd_addr[16]; logic [3:0] rd_rot = 0;
  pix_t line_out[16], wr_data[16];
  logic [5:0] wr_row = 0; logic [2:0] wr_blk = 0;
  pix_t img[H][W];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sw_sram dut (.*);
  initial begin
    for (int k = 0; k < 16; k++) begin rd_addr[k] = 0; wr_data[k] = 0; end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = pix_t'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int y = 0; y < H; y++) for (int b = 0; b < W/16; b++) begin
      wr_en = 1; wr_row = 6'(y); wr_blk = 3'(b);
      for (int k = 0; k < 16; k++) wr_data[k] = img[y][16*b+k];
      @(negedge clk);
    end
    wr_en = 0;
    for (int t = 0; t < 400; t++) begin
      bit col; int x0, y0;
      col = 1'($urandom);
      x0 = col ? int'($urandom_range(0, W-1)) : int'($urandom_range(0, W-16));
      y0 = col ? int'($urandom_range(0, H-16)) : int'($urandom_range(0, H-1));
      for (int k = 0; k < 16; k++) begin
        int x, y;
        x = col ? x0 : x0 + k; y = col ? y0 + k : y0;
        rd_addr[(x + y) % 16] = 8'(y * 5 + x / 16);
      end
      rd_rot = 4'((x0 + y0) % 16); rd_en = 1;
      @(negedge clk);
      rd_en = 0; rd_rot = 4'($urandom);   // must not disturb the line just read
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (line_out[k] != img[col ? y0+k : y0][col ? x0 : x0+k]) begin
          failures++; $display("FAIL: %s x0 %0d y0 %0d k %0d", col ? "col" : "row", x0, y0, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
