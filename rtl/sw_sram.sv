// sw_sram: search-window memory in the ladder-shaped arrangement.
//
// The search window, SW_W x SW_H pixels, is spread over BLK single-port
// banks so that any horizontal or vertical line of BLK pixels lies in BLK
// different banks and is read in one cycle (2-D random access). Pixel (x, y)
// is held in bank (x + y) mod BLK at word y * (SW_W / BLK) + x / BLK: each row
// is the plain interleaved layout rotated right by its row number.
//
// Read: the address generator gives one word address per bank (rd_addr) and
// the rotation rd_rot = (x0 + y0) mod BLK of the line's first pixel (x0, y0).
// The banks are read synchronously; one cycle after rd_en the line appears on
// line_out in order (first pixel at index 0) after a rotation by rd_rot.
// Write: one aligned row segment of BLK pixels, columns wr_blk*BLK..+BLK-1 of
// row wr_row, per cycle; it lands at the same word of every bank, rotated by
// wr_row. A write and a read may not happen in the same cycle (single-port
// banks); the write wins.
// The ladder-shaped arrangement follows the published design (drawn there
// with eight memories); sixteen banks, the window size from the +-32/+-16
// search range and both ports are this design's.
module sw_sram
  import ime_pkg::*;
#(
  parameter int unsigned SW_W   = 80,
  parameter int unsigned SW_H   = 48,
  localparam int unsigned WORDS  = SW_W * SW_H / BLK,
  localparam int unsigned ADDR_W = $clog2(WORDS),
  localparam int unsigned ROW_W  = $clog2(SW_H),
  localparam int unsigned BLKN_W = (SW_W / BLK > 1) ? $clog2(SW_W / BLK) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // read port
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr[BLK],
  input  logic [3:0]        rd_rot,
  output pix_t              line_out[BLK],
  // write port
  input  logic              wr_en,
  input  logic [ROW_W-1:0]  wr_row,
  input  logic [BLKN_W-1:0] wr_blk,
  input  pix_t              wr_data[BLK]
);
  localparam int unsigned STRIDE = SW_W / BLK;

  pix_t       mem[BLK][WORDS];
  pix_t       q[BLK];
  logic [3:0] rot_q;

  logic [ADDR_W-1:0] wr_addr;
  assign wr_addr = ADDR_W'(wr_row * STRIDE + wr_blk);

  for (genvar b = 0; b < BLK; b++) begin : g_bank
    always_ff @(posedge clk) begin
      if (wr_en)
        mem[b][wr_addr] <= wr_data[(b - int'(wr_row)) & (BLK - 1)];
      else if (rd_en)
        q[b] <= mem[b][rd_addr[b]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rot_q <= '0;
    else if (rd_en) rot_q <= rd_rot;
  end

  always_comb begin
    for (int k = 0; k < BLK; k++)
      line_out[k] = q[(int'(rot_q) + k) & (BLK - 1)];
  end
endmodule
