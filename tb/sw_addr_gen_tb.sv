// sw_addr_gen_tb: the address generator drives a search-window memory
// holding a random window. From random start positions it is fed random
// one-pixel moves that keep the candidate inside the +-32/+-16 range, and
// first a 16-row fill; after each move the line read must be the one the
// move brings in (the new right/left column or bottom/top row of the
// candidate block, in order), and pos_mv the candidate's new MV. Each run
// uses a random column base: window column group g is then read from memory
// group (g + base) mod 5.
module sw_addr_gen_tb;
  import ime_pkg::*;
  localparam int W = 80, H = 48, SRX = 32, SRY = 16;
  logic [2:0] col_base = 0;
  logic clk = 0, rst_n = 0, load = 0, mv_en = 0; mv_t load_mv = '0; dir_t dir = DIR_DOWN;
  logic rd_en; logic [7:0] rd_addr[16]; logic [3:0] rd_rot; mv_t pos_mv;
  logic wr_en = 0; logic [5:0] wr_row = 0; logic [2:0] wr_blk = 0; pix_t wr_data[16], line_out[16];
  pix_t img[H][W];
  int checks = 0, failures = 0, used[4] = '{0,0,0,0};
  always #5 clk = ~clk;
  sw_addr_gen dut (.clk, .rst_n, .col_base, .load, .load_mv, .mv_en, .dir, .rd_en, .rd_addr, .rd_rot, .pos_mv);
  sw_sram u_mem (.clk, .rst_n, .rd_en, .rd_addr, .rd_rot, .line_out, .wr_en, .wr_row, .wr_blk, .wr_data);

  task automatic move(dir_t d, int px, int py, bit chk);
    int ex[16], ey[16];
    for (int k = 0; k < 16; k++)
      case (d)
        DIR_RIGHT: begin ex[k] = px + 16; ey[k] = py + k; end
        DIR_LEFT:  begin ex[k] = px - 1;  ey[k] = py + k; end
        DIR_DOWN:  begin ex[k] = px + k;  ey[k] = py + 16; end
        default:   begin ex[k] = px + k;  ey[k] = py - 1; end
      endcase
    dir = d; mv_en = 1; #1;
    if (chk) begin
      int nx, ny;
      nx = px - SRX + ((d == DIR_RIGHT) ? 1 : (d == DIR_LEFT) ? -1 : 0);
      ny = py - SRY + ((d == DIR_DOWN) ? 1 : (d == DIR_UP) ? -1 : 0);
      checks++;
      if (int'(pos_mv.x) != nx || int'(pos_mv.y) != ny) begin failures++; $display("FAIL: pos_mv"); end
    end
    @(negedge clk); mv_en = 0;
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (line_out[k] != img[ey[k]][16*((ex[k]/16 + int'(col_base)) % 5) + ex[k] % 16]) begin
        failures++; $display("FAIL: dir %0d pos (%0d,%0d) k %0d", d, px, py, k);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 16; k++) wr_data[k] = 0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = pix_t'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int y = 0; y < H; y++) for (int b = 0; b < W/16; b++) begin
      wr_en = 1; wr_row = 6'(y); wr_blk = 3'(b);
      for (int k = 0; k < 16; k++) wr_data[k] = img[y][16*b+k];
      @(negedge clk);
    end
    wr_en = 0;
    for (int s = 0; s < 10; s++) begin
      int px, py;
      px = int'($urandom_range(0, 2*SRX)); py = int'($urandom_range(0, 2*SRY));
      col_base = 3'($urandom_range(0, 4));
      load = 1; load_mv = '{x: coord_t'(px - SRX), y: coord_t'(py - 16 - SRY)}; @(negedge clk); load = 0;
      for (int k = 0; k < 16; k++) move(DIR_DOWN, px, py - 16 + k, 1'b0);
      for (int t = 0; t < 60; t++) begin
        dir_t d;
        d = dir_t'($urandom_range(0, 3));
        if ((d == DIR_RIGHT && px == 2*SRX) || (d == DIR_LEFT && px == 0) ||
            (d == DIR_DOWN && py == 2*SRY) || (d == DIR_UP && py == 0)) continue;
        used[d]++;
        move(d, px, py, 1'b1);
        case (d)
          DIR_RIGHT: px++; DIR_LEFT: px--; DIR_DOWN: py++; default: py--;
        endcase
      end
    end
    checks++;
    if (used[0] == 0 || used[1] == 0 || used[2] == 0 || used[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
