// pe_array: the 256 processing elements of the 2-D SAD tree datapath.
//
// Each element subtracts a reference pixel from the co-located current pixel
// and takes the absolute value, all 256 in parallel and purely
// combinationally. Inputs and outputs are 16x16 arrays indexed [row][column].
// The element function (subtract, absolute) is as published; widths are this
// design's: 8-bit pixels give 8-bit differences.
module pe_array
  import ime_pkg::*;
(
  input  pix_t cur [BLK][BLK],
  input  pix_t refp[BLK][BLK],
  output pix_t diff[BLK][BLK]
);
  always_comb begin
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++)
        diff[r][c] = (cur[r][c] >= refp[r][c]) ? pix_t'(cur[r][c] - refp[r][c])
                                               : pix_t'(refp[r][c] - cur[r][c]);
  end
endmodule
