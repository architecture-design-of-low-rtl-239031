// vbs_adder_tree: variable-block-size 2-D SAD adder tree.
//
// Sixteen 2-D adder trees each reduce the 16 absolute differences of one 4x4
// block to its SAD (first the four pixels of each row, then the four row
// sums). A second tree then forms the 25 larger partitions by adding 4x4
// SADs only, never pixels: 8x4 and 4x8 from pairs of 4x4, 8x8 from four 4x4,
// 16x8 and 8x16 from pairs of 8x8, 16x16 from the four 8x8. All 41 SADs of
// one candidate come out in the same cycle, combinationally. diff is indexed
// [row][column]; sad[] uses the partition numbering of ime_pkg.
// The two-level structure (4x4 trees, then one VBS tree reusing the 4x4
// results) is the published one; the numbering is this design's.
module vbs_adder_tree
  import ime_pkg::*;
(
  input  pix_t diff[BLK][BLK],
  output sad_t sad [NUM_PART]
);
  sad_t s4  [4][4];   // [block row][block column]
  sad_t s8  [4];      // 8x8, raster order

  always_comb begin
    for (int by = 0; by < 4; by++)
      for (int bx = 0; bx < 4; bx++) begin
        sad_t row_sum[4];
        for (int r = 0; r < 4; r++)
          row_sum[r] = (sad_t'(diff[4*by+r][4*bx])   + sad_t'(diff[4*by+r][4*bx+1]))
                     + (sad_t'(diff[4*by+r][4*bx+2]) + sad_t'(diff[4*by+r][4*bx+3]));
        s4[by][bx] = (row_sum[0] + row_sum[1]) + (row_sum[2] + row_sum[3]);
      end

    for (int i = 0; i < 4; i++) begin
      int y0, x0;
      y0 = 2 * (i / 2);
      x0 = 2 * (i % 2);
      s8[i] = (s4[y0][x0] + s4[y0][x0+1]) + (s4[y0+1][x0] + s4[y0+1][x0+1]);
      sad[5+i]      = s8[i];
      sad[9+2*i]    = s4[y0][x0]   + s4[y0][x0+1];     // 8x4 top
      sad[9+2*i+1]  = s4[y0+1][x0] + s4[y0+1][x0+1];   // 8x4 bottom
      sad[17+2*i]   = s4[y0][x0]   + s4[y0+1][x0];     // 4x8 left
      sad[17+2*i+1] = s4[y0][x0+1] + s4[y0+1][x0+1];   // 4x8 right
    end

    sad[1] = s8[0] + s8[1];                            // 16x8 top
    sad[2] = s8[2] + s8[3];                            // 16x8 bottom
    sad[3] = s8[0] + s8[2];                            // 8x16 left
    sad[4] = s8[1] + s8[3];                            // 8x16 right
    sad[0] = sad[1] + sad[2];                          // 16x16

    for (int by = 0; by < 4; by++)
      for (int bx = 0; bx < 4; bx++)
        sad[25 + 4*by + bx] = s4[by][bx];
  end
endmodule
