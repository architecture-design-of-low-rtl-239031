// sw_addr_gen: search-window address generator.
//
// Keeps the search-window position (px, py) of the candidate held in the
// reference array (top-left pixel; py may be negative while the array is
// being filled). load sets it from a motion vector, px = mv.x + SR_X,
// py = mv.y + SR_Y. For each move (mv_en, dir) it issues, in the same cycle,
// a read of the line the move brings in and then steps the position:
//   DIR_RIGHT column px+16, DIR_LEFT column px-1  (rows py to py+15)
//   DIR_DOWN  row    py+16, DIR_UP   row    py-1  (columns px to px+15)
// For a line whose k-th pixel is (x0 + k, y0) or (x0, y0 + k), bank b holds
// pixel k = (b - x0 - y0) mod 16 at word y * (SW_W/16) + x / 16 (ladder
// layout of sw_sram); rd_rot = (x0 + y0) mod 16 puts the line back in order.
// The window is circular in whole 16-pixel column groups: window column
// group g is stored in memory group (g + col_base) mod (SW_W/16), so when
// the macroblock advances by 16 pixels only the entering group is rewritten
// (into the memory group of the leaving one) and col_base is advanced. The
// bank of a pixel does not depend on col_base, since 16 is a multiple of the
// bank count. rd_addr/rd_rot/rd_en are combinational from the inputs.
// Taking a moving direction and driving the SW memory follows the published
// block diagram, as does reusing the window of neighbouring macroblocks; the
// position register, the address formulae and the circular column groups are
// this design's, derived from the ladder arrangement.
module sw_addr_gen
  import ime_pkg::*;
#(
  parameter int unsigned SW_W   = 80,
  parameter int unsigned SW_H   = 48,
  parameter int unsigned SR_X   = 32,
  parameter int unsigned SR_Y   = 16,
  localparam int unsigned WORDS  = SW_W * SW_H / BLK,
  localparam int unsigned ADDR_W = $clog2(WORDS),
  localparam int unsigned BLKN_W = (SW_W / BLK > 1) ? $clog2(SW_W / BLK) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BLKN_W-1:0] col_base,     // memory group of window columns 0..15
  input  logic              load,
  input  mv_t               load_mv,
  input  logic              mv_en,
  input  dir_t              dir,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr[BLK],
  output logic [3:0]        rd_rot,
  output mv_t               pos_mv        // MV of the candidate after the move
);
  localparam int STRIDE = SW_W / BLK;

  logic signed [9:0] px, py;  // current position
  int x0, y0;                 // first pixel of the line to read
  logic is_col;

  // window column group -> memory column group (circular in steps of 16)
  function automatic int phys_group(input int g);
    int p;
    p = g + int'(col_base);
    return (p >= STRIDE) ? p - STRIDE : p;
  endfunction

  always_comb begin
    is_col = (dir == DIR_LEFT) || (dir == DIR_RIGHT);
    unique case (dir)
      DIR_RIGHT: begin x0 = int'(px) + BLK; y0 = int'(py);       end
      DIR_LEFT:  begin x0 = int'(px) - 1;   y0 = int'(py);       end
      DIR_DOWN:  begin x0 = int'(px);       y0 = int'(py) + BLK; end
      DIR_UP:    begin x0 = int'(px);       y0 = int'(py) - 1;   end
    endcase
    rd_en  = mv_en;
    rd_rot = 4'((x0 + y0) & (BLK - 1));
    for (int b = 0; b < BLK; b++) begin
      int k;
      k = (b - x0 - y0) & (BLK - 1);
      if (is_col) rd_addr[b] = ADDR_W'((y0 + k) * STRIDE + phys_group(x0 / BLK));
      else        rd_addr[b] = ADDR_W'(y0 * STRIDE + phys_group((x0 + k) / BLK));
    end
    pos_mv.x = coord_t'(int'(px) - int'(SR_X));
    pos_mv.y = coord_t'(int'(py) - int'(SR_Y));
    unique case (dir)
      DIR_RIGHT: pos_mv.x = coord_t'(int'(px) + 1 - int'(SR_X));
      DIR_LEFT:  pos_mv.x = coord_t'(int'(px) - 1 - int'(SR_X));
      DIR_DOWN:  pos_mv.y = coord_t'(int'(py) + 1 - int'(SR_Y));
      DIR_UP:    pos_mv.y = coord_t'(int'(py) - 1 - int'(SR_Y));
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      px <= '0;
      py <= '0;
    end else if (load) begin
      px <= 10'(int'(load_mv.x) + int'(SR_X));
      py <= 10'(int'(load_mv.y) + int'(SR_Y));
    end else if (mv_en) begin
      unique case (dir)
        DIR_RIGHT: px <= px + 10'sd1;
        DIR_LEFT:  px <= px - 10'sd1;
        DIR_DOWN:  py <= py + 10'sd1;
        DIR_UP:    py <= py - 10'sd1;
      endcase
    end
  end
endmodule
