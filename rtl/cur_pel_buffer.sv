// cur_pel_buffer: 16x16 current-macroblock buffer.
//
// Holds the pixels of the macroblock being searched and presents all 256 of
// them to the PE array at once for the whole search. It is written one
// 16-pixel row per cycle (wr_en, wr_row, wr_data); the row is visible on
// cur[] from the next cycle. The buffer and its 256-pixel output follow the
// published block diagram; the row-wise write port is this design's choice.
module cur_pel_buffer
  import ime_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [3:0] wr_row,
  input  pix_t       wr_data[BLK],
  output pix_t       cur[BLK][BLK]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++) cur[r][c] <= '0;
    end else if (wr_en) begin
      for (int c = 0; c < BLK; c++) cur[wr_row][c] <= wr_data[c];
    end
  end
endmodule
