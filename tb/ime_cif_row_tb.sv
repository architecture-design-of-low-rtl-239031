// ime_cif_row_tb: one full row of CIF macroblocks (352 pixels wide, 22
// macroblocks) through the engine in each of three operating modes, with the
// time per macroblock checked against real-time CIF at 30 fps (11,880
// macroblocks per second):
//   ultra low power  one centre (the left neighbour's 16x16 MV as predictor),
//                    one reference, window slid by one column group per
//                    macroblock; budget 13.5 MHz -> 1136 cycles/macroblock
//   low power        three centres (predictor, zero MV, the MV of the
//                    macroblock two to the left), one reference, window slid;
//                    budget 13.5 MHz -> 1136 cycles/macroblock
//   high quality     the same three centres in each of two references, the
//                    window rewritten for every search; budget 27 MHz ->
//                    2272 cycles/macroblock
// The frames are generated: the reference is a smooth texture, the current
// frame the same texture displaced by a different motion in each third of
// the row, pixels outside the frame repeat the nearest edge pixel. Every
// macroblock's 41 results are compared with a model that runs the square
// search and computes SADs pixel by pixel. Cycles are counted from the first
// window or macroblock write to done.
module ime_cif_row_tb;
  import ime_pkg::*;

  localparam int SRX = 32, SRY = 16, W = 16 + 2*SRX, H = 16 + 2*SRY;
  localparam int NC = 4, MAXST = 4, FW = 352, FH = 288, NMB = FW / 16, MBY = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       sw_wr_en = 0;  logic [5:0] sw_wr_row = 0;  logic [2:0] sw_wr_blk = 0;
  logic [2:0] sw_col_base = 0;
  pix_t       sw_wr_data[16];
  logic       cur_wr_en = 0; logic [3:0] cur_wr_row = 0; pix_t cur_wr_data[16];
  logic       start = 0;     logic ref_idx = 0;          logic [2:0] num_centers = 0;
  mv_t        centers[NC];
  logic       busy, done;
  logic [15:0] sw_reads;     logic [7:0] steps;
  logic       fme_ref = 0;   logic [5:0] fme_part = 0;
  sad_t       fme_sad;       mv_t fme_mv;                logic fme_valid;

  ime_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- frames ----------------
  function automatic pix_t ref_pix(int r, int x, int y);
    x = (x < 0) ? 0 : (x >= FW) ? FW-1 : x;
    y = (y < 0) ? 0 : (y >= FH) ? FH-1 : y;
    if (r == 0) return pix_t'(int'(128.0 + 50.0*$sin(x/11.0 + y/29.0) + 40.0*$cos(y/13.0 - x/37.0)));
    else        return pix_t'(int'(128.0 + 45.0*$sin(x/17.0 - y/23.0) + 45.0*$cos(y/9.0 + x/31.0)));
  endfunction
  function automatic void true_mv(int mbx, output int dx, output int dy);
    if (mbx < 7)       begin dx = 3;   dy = -2; end
    else if (mbx < 15) begin dx = -12; dy = 5;  end
    else               begin dx = 20;  dy = -9; end
  endfunction
  // current frame: reference 0 displaced by the true motion
  function automatic pix_t cur_pix(int x, int y);
    int dx, dy;
    true_mv(x / 16, dx, dy);
    return ref_pix(0, x + dx, y + dy);
  endfunction

  pix_t sw [H][W];
  pix_t cur[16][16];

  // ---------------- reference model ----------------
  function automatic void part_geom(int p, output int x0, output int y0, output int w, output int h);
    int i, j;
    if (p == 0)      begin x0 = 0; y0 = 0; w = 16; h = 16; end
    else if (p < 3)  begin x0 = 0; y0 = 8*(p-1); w = 16; h = 8; end
    else if (p < 5)  begin x0 = 8*(p-3); y0 = 0; w = 8; h = 16; end
    else if (p < 9)  begin i = p-5; x0 = 8*(i%2); y0 = 8*(i/2); w = 8; h = 8; end
    else if (p < 17) begin i = (p-9)/2; j = (p-9)%2; x0 = 8*(i%2); y0 = 8*(i/2)+4*j; w = 8; h = 4; end
    else if (p < 25) begin i = (p-17)/2; j = (p-17)%2; x0 = 8*(i%2)+4*j; y0 = 8*(i/2); w = 4; h = 8; end
    else             begin i = p-25; x0 = 4*(i%4); y0 = 4*(i/4); w = 4; h = 4; end
  endfunction
  function automatic int sad_of(int p, int mx, int my);
    int x0, y0, w, h, s, d;
    part_geom(p, x0, y0, w, h);
    s = 0;
    for (int r = y0; r < y0+h; r++)
      for (int q = x0; q < x0+w; q++) begin
        d = int'(cur[r][q]) - int'(sw[my+SRY+r][mx+SRX+q]);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction
  function automatic bit better(int sa, int xa, int ya, int sb, int xb, int yb);
    if (sa != sb) return sa < sb;
    if (ya != yb) return ya < yb;
    return xa < xb;
  endfunction
  function automatic int clampi(int v, int lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  bit vis_all[2*SRY+1][2*SRX+1];
  bit vis_c  [2*SRY+1][2*SRX+1];
  int exp_sad[41], exp_x[41], exp_y[41];

  task automatic model_center(int cx0, int cy0);
    int cx, cy, bx, by, bs, step, s;
    cx = clampi(cx0, SRX-1); cy = clampi(cy0, SRY-1);
    foreach (vis_c[i, j]) vis_c[i][j] = 0;
    step = 1;
    forever begin
      for (int j = -1; j <= 1; j++) for (int i = -1; i <= 1; i++) begin
        vis_c[cy+j+SRY][cx+i+SRX] = 1; vis_all[cy+j+SRY][cx+i+SRX] = 1;
      end
      bs = -1;
      for (int y = -SRY; y <= SRY; y++) for (int x = -SRX; x <= SRX; x++)
        if (vis_c[y+SRY][x+SRX]) begin
          s = sad_of(0, x, y);
          if (bs < 0 || better(s, x, y, bs, bx, by)) begin bs = s; bx = x; by = y; end
        end
      if ((bx == cx && by == cy) || step >= MAXST ||
          bx > SRX-1 || bx < 1-SRX || by > SRY-1 || by < 1-SRY) break;
      cx = bx; cy = by; step++;
    end
  endtask

  task automatic model(int nc, int cx[NC], int cy[NC]);
    int s;
    foreach (vis_all[i, j]) vis_all[i][j] = 0;
    for (int i = 0; i < nc; i++) model_center(cx[i], cy[i]);
    for (int p = 0; p < 41; p++) begin
      exp_sad[p] = -1;
      for (int y = -SRY; y <= SRY; y++) for (int x = -SRX; x <= SRX; x++)
        if (vis_all[y+SRY][x+SRX]) begin
          s = sad_of(p, x, y);
          if (exp_sad[p] < 0 || better(s, x, y, exp_sad[p], exp_x[p], exp_y[p])) begin
            exp_sad[p] = s; exp_x[p] = x; exp_y[p] = y;
          end
        end
    end
  endtask

  // ---------------- engine access ----------------
  int cyc;
  always @(posedge clk) cyc <= cyc + 1;

  // window of macroblock mbx in reference r; writes window groups g0..4
  task automatic write_window(int r, int mbx, int g0);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      sw[y][x] = ref_pix(r, 16*mbx - SRX + x, 16*MBY - SRY + y);
    for (int y = 0; y < H; y++)
      for (int g = g0; g < W/16; g++) begin
        sw_wr_en = 1; sw_wr_row = 6'(y); sw_wr_blk = 3'((g + int'(sw_col_base)) % (W/16));
        for (int k = 0; k < 16; k++) sw_wr_data[k] = sw[y][16*g+k];
        @(negedge clk);
      end
    sw_wr_en = 0;
  endtask

  task automatic write_cur(int mbx);
    for (int r = 0; r < 16; r++) begin
      for (int q = 0; q < 16; q++) cur[r][q] = cur_pix(16*mbx + q, 16*MBY + r);
      cur_wr_en = 1; cur_wr_row = 4'(r);
      for (int k = 0; k < 16; k++) cur_wr_data[k] = cur[r][k];
      @(negedge clk);
    end
    cur_wr_en = 0;
  endtask

  task automatic run_search(int r, int nc, int cx[NC], int cy[NC], string name, output int best_x, output int best_y);
    model(nc, cx, cy);
    num_centers = 3'(nc);
    for (int i = 0; i < NC; i++) centers[i] = '{x: coord_t'(cx[i]), y: coord_t'(cy[i])};
    ref_idx = (r != 0);
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);  // the best-info buffer stores on the done edge
    check(!busy && sw_reads != 0 && steps >= 8'(nc),
          $sformatf("%s: idle after done, %0d line reads, %0d steps", name, sw_reads, steps));
    fme_ref = (r != 0);
    for (int p = 0; p < 41; p++) begin
      fme_part = 6'(p); #1;
      check(fme_valid && int'(fme_sad) == exp_sad[p] && int'(fme_mv.x) == exp_x[p] && int'(fme_mv.y) == exp_y[p],
            $sformatf("%s part %0d: sad %0d mv (%0d,%0d), expected %0d (%0d,%0d)", name, p,
                      fme_sad, fme_mv.x, fme_mv.y, exp_sad[p], exp_x[p], exp_y[p]));
    end
    best_x = exp_x[0]; best_y = exp_y[0];
  endtask

  // mode: 0 ultra low power, 1 low power, 2 high quality
  task automatic run_mode(int mode, int budget, string mname);
    int pred_x, pred_y, prev2_x, prev2_y, bx, by, t0, worst, nc, nref, hits;
    int cx[NC], cy[NC];
    pred_x = 0; pred_y = 0; prev2_x = 0; prev2_y = 0; worst = 0; hits = 0;
    nref = (mode == 2) ? 2 : 1;
    for (int mbx = 0; mbx < NMB; mbx++) begin
      int mb_bx, mb_by;
      t0 = cyc;
      nc = (mode == 0) ? 1 : 3;
      cx = '{pred_x, 0, prev2_x, 0}; cy = '{pred_y, 0, prev2_y, 0};
      write_cur(mbx);
      for (int r = 0; r < nref; r++) begin
        if (mode == 2 || mbx == 0) begin
          sw_col_base = 0;
          write_window(r, mbx, 0);
        end else begin
          sw_col_base = 3'(mbx % (W/16));
          write_window(r, mbx, W/16 - 1);
        end
        run_search(r, nc, cx, cy, $sformatf("%s mb %0d ref %0d", mname, mbx, r), bx, by);
        if (r == 0) begin mb_bx = bx; mb_by = by; end
      end
      worst = (cyc - t0 > worst) ? cyc - t0 : worst;
      begin
        int dx, dy;
        true_mv(mbx, dx, dy);
        if (mb_bx == dx && mb_by == dy) hits++;
      end
      prev2_x = pred_x; prev2_y = pred_y;
      pred_x = mb_bx; pred_y = mb_by;
    end
    check(worst <= budget, $sformatf("%s: %0d cycles per macroblock, budget %0d", mname, worst, budget));
    $display("%s: worst %0d cycles per macroblock (budget %0d), true motion found in %0d of %0d macroblocks",
             mname, worst, budget, hits, NMB);
  endtask

  initial begin
    for (int k = 0; k < 16; k++) begin sw_wr_data[k] = 0; cur_wr_data[k] = 0; end
    for (int i = 0; i < NC; i++) centers[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_mode(0, 13_500_000 / 11_880, "ultra low power");
    run_mode(1, 13_500_000 / 11_880, "low power");
    run_mode(2, 27_000_000 / 11_880, "high quality");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
