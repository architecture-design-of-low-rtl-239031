// ref_systolic_array: 16x16 reference-pixel register array with four shift
// configurations.
//
// The array holds the reference block of the current candidate,
// refp[r][c] = SW(x + c, y + r). When shift_en is high the candidate moves
// one pixel in direction dir: the 256 registers shift by one position the
// opposite way and the 16-pixel line line_in enters on the side the
// candidate moves towards (DIR_DOWN: up-shift, line_in is the new bottom
// row; DIR_UP: down-shift, new top row; DIR_RIGHT: left-shift, new right
// column; DIR_LEFT: right-shift, new left column). line_in[k] is the k-th
// pixel of that row (left to right) or column (top to bottom). The new
// contents appear one cycle after shift_en. Without shift_en the array
// holds, so it does not toggle while the engine is idle.
// The four configurations follow the published design; the ordering of
// line_in and the enable are this design's.
module ref_systolic_array
  import ime_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic shift_en,
  input  dir_t dir,
  input  pix_t line_in[BLK],
  output pix_t refp[BLK][BLK]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++) refp[r][c] <= '0;
    end else if (shift_en) begin
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++)
          unique case (dir)
            DIR_DOWN:  refp[r][c] <= (r == BLK-1) ? line_in[c] : refp[r+1][c];
            DIR_UP:    refp[r][c] <= (r == 0)     ? line_in[c] : refp[r-1][c];
            DIR_RIGHT: refp[r][c] <= (c == BLK-1) ? line_in[r] : refp[r][c+1];
            DIR_LEFT:  refp[r][c] <= (c == 0)     ? line_in[r] : refp[r][c-1];
          endcase
    end
  end
endmodule
