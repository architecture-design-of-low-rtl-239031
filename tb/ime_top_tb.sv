// ime_top_tb: end-to-end test of the motion estimation engine at its
// default size (+-32 x +-16 search range, 80x48 window, four centres, two
// reference slots, four FSS steps).
//
// Each search loads a generated window and macroblock, starts the engine and
// compares all 41 best SAD/MV pairs of the result slot with a reference
// model written directly from the algorithm: it runs the one-pixel square
// search per centre (stop when the centre is the minimum, after four steps,
// or when the next square would leave the range), collects every candidate
// position searched, and takes per partition the minimum of SADs computed
// pixel by pixel. It also checks the number of FSS steps, the bounds on the
// line reads, the cycle count from start to done, the 38 line reads of the
// four-step example path (16 fill + 8 + 5 + 6 + 3), and that the other
// result slot is untouched. Mechanisms counted (each must occur): array
// fill, moves in each of the four directions, bubble moves onto already
// searched candidates, 8-move ROM strings, stops at the centre, at the step
// limit and at the range border, clamped centres, multi-centre searches and
// stores into both slots, window slides (the macroblock advances along
// a strip and only the entering 16-column group of the window is rewritten
// while the column base advances), and clock gating: the datapath clock
// must tick in exactly the cycles with start or busy high, and cycles with
// the engine asleep must occur.
module ime_top_tb;
  import ime_pkg::*;

  localparam int SRX = 32, SRY = 16, W = 16 + 2*SRX, H = 16 + 2*SRY;
  localparam int NC = 4, MAXST = 4;

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
  int n_fill = 0, n_dir[4] = '{0,0,0,0}, n_bubble = 0, n_long = 0;
  int n_stop_center = 0, n_stop_max = 0, n_stop_border = 0, n_clamp = 0, n_multi = 0;
  int n_store[2] = '{0,0};
  int n_slide = 0;
  int n_en = 0, n_gclk = 0, n_sleep = 0;

  pix_t sw [H][W];
  pix_t cur[16][16];
  int   exp_sad[2][41], exp_x[2][41], exp_y[2][41];
  logic slot_written[2] = '{0,0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- stimulus generation ----------------
  function automatic pix_t tex(int a, int b, int c, int x, int y);
    return pix_t'(((a*x*x + b*y*y + c*x*y) >>> 4) & 255);
  endfunction

  task automatic make_smooth(int a, int b, int c, int tx, int ty);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) sw[y][x] = tex(a, b, c, x, y);
    for (int r = 0; r < 16; r++) for (int q = 0; q < 16; q++) cur[r][q] = sw[ty+SRY+r][tx+SRX+q];
  endtask

  task automatic make_noise();
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) sw[y][x] = pix_t'($urandom);
    for (int r = 0; r < 16; r++) for (int q = 0; q < 16; q++) cur[r][q] = pix_t'($urandom);
  endtask

  // Writes window column groups first_g..W/16-1; window group g goes to
  // memory group (g + sw_col_base) mod 5.
  task automatic load_all(int first_g = 0);
    @(negedge clk);
    for (int y = 0; y < H; y++)
      for (int b = first_g; b < W/16; b++) begin
        sw_wr_en = 1; sw_wr_row = 6'(y); sw_wr_blk = 3'((b + int'(sw_col_base)) % (W/16));
        for (int k = 0; k < 16; k++) sw_wr_data[k] = sw[y][16*b+k];
        @(negedge clk);
      end
    sw_wr_en = 0;
    for (int r = 0; r < 16; r++) begin
      cur_wr_en = 1; cur_wr_row = 4'(r);
      for (int k = 0; k < 16; k++) cur_wr_data[k] = cur[r][k];
      @(negedge clk);
    end
    cur_wr_en = 0;
  endtask

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

  bit vis_all[2*SRY+1][2*SRX+1];
  bit vis_c  [2*SRY+1][2*SRX+1];
  int model_steps;

  function automatic int clampi(int v, int lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  task automatic model_center(int cx0, int cy0);
    int cx, cy, bx, by, bs, step, s;
    cx = clampi(cx0, SRX-1); cy = clampi(cy0, SRY-1);
    if (cx != cx0 || cy != cy0) n_clamp++;
    foreach (vis_c[i, j]) vis_c[i][j] = 0;
    step = 1;
    forever begin
      for (int j = -1; j <= 1; j++) for (int i = -1; i <= 1; i++) begin
        vis_c[cy+j+SRY][cx+i+SRX] = 1;
        vis_all[cy+j+SRY][cx+i+SRX] = 1;
      end
      bs = -1;
      for (int y = -SRY; y <= SRY; y++) for (int x = -SRX; x <= SRX; x++)
        if (vis_c[y+SRY][x+SRX]) begin
          s = sad_of(0, x, y);
          if (bs < 0 || better(s, x, y, bs, bx, by)) begin bs = s; bx = x; by = y; end
        end
      if (bx == cx && by == cy) begin n_stop_center++; break; end
      if (step >= MAXST)        begin n_stop_max++;    break; end
      if (bx > SRX-1 || bx < 1-SRX || by > SRY-1 || by < 1-SRY) begin n_stop_border++; break; end
      cx = bx; cy = by; step++;
    end
    model_steps += step;
  endtask

  // ---------------- clock gating ----------------
  // The datapath clock must tick exactly in the cycles with start or busy
  // high and stay still in the others (the engine sleeps).
  always @(posedge clk) if (rst_n) begin
    if (start || busy) n_en++;
    else               n_sleep++;
  end
  always @(posedge dut.gclk) if (rst_n) n_gclk++;

  // ---------------- monitor of the issued moves ----------------
  bit seen_c[2*SRY+1][2*SRX+1];
  int step_moves;
  always @(posedge clk) if (rst_n) begin
    if (dut.ag_load) begin
      foreach (seen_c[i, j]) seen_c[i][j] = 0;
      n_fill++;
    end
    if (dut.sc_clr) step_moves = 0;
    if (dut.mv_en && dut.cand_valid) begin
      int x, y;
      x = int'(dut.cand_mv.x) + SRX; y = int'(dut.cand_mv.y) + SRY;
      if (dut.u_fsm.state inside {dut.u_fsm.S_MOVE}) begin
        n_dir[dut.mv_dir]++;
        step_moves++;
        if (seen_c[y][x]) n_bubble++;
        if (dut.rom_last && step_moves >= 7) n_long++;
      end
      seen_c[y][x] = 1;
    end
  end

  // ---------------- one search ----------------
  task automatic search(int nc, int cx[NC], int cy[NC], int slot, int exp_reads, string name,
                        int first_g = 0);
    int cyc, x0, y0, s, ms;
    foreach (vis_all[i, j]) vis_all[i][j] = 0;
    model_steps = 0;
    for (int i = 0; i < nc; i++) model_center(cx[i], cy[i]);
    if (nc > 1) n_multi++;
    for (int p = 0; p < 41; p++) begin
      exp_sad[slot][p] = -1;
      for (int y = -SRY; y <= SRY; y++) for (int x = -SRX; x <= SRX; x++)
        if (vis_all[y+SRY][x+SRX]) begin
          s = sad_of(p, x, y);
          if (exp_sad[slot][p] < 0 || better(s, x, y, exp_sad[slot][p], exp_x[slot][p], exp_y[slot][p])) begin
            exp_sad[slot][p] = s; exp_x[slot][p] = x; exp_y[slot][p] = y;
          end
        end
    end

    load_all(first_g);
    num_centers = 3'(nc);
    for (int i = 0; i < NC; i++) centers[i] = '{x: coord_t'(cx[i]), y: coord_t'(cy[i])};
    ref_idx = slot[0];
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    n_store[slot]++;
    slot_written[slot] = 1;
    @(negedge clk);

    check(int'(steps) == model_steps, $sformatf("%s: steps %0d, expected %0d", name, steps, model_steps));
    ms = int'(sw_reads) - 24*nc;
    check(ms >= 3*(model_steps-nc) && ms <= 8*(model_steps-nc),
          $sformatf("%s: %0d moves for %0d extra steps", name, ms, model_steps-nc));
    check(cyc == 2 + 6*nc + int'(sw_reads) + 4*(int'(steps)-nc),
          $sformatf("%s: %0d cycles start to done (reads %0d, steps %0d)", name, cyc, sw_reads, steps));
    if (exp_reads >= 0)
      check(int'(sw_reads) == exp_reads, $sformatf("%s: %0d line reads, expected %0d", name, sw_reads, exp_reads));

    for (int sl = 0; sl < 2; sl++) if (slot_written[sl]) begin
      fme_ref = sl[0];
      for (int p = 0; p < 41; p++) begin
        fme_part = 6'(p);
        #1;
        check(fme_valid && int'(fme_sad) == exp_sad[sl][p] && int'(fme_mv.x) == exp_x[sl][p] &&
              int'(fme_mv.y) == exp_y[sl][p],
              $sformatf("%s: slot %0d part %0d got sad %0d mv (%0d,%0d), expected %0d (%0d,%0d)",
                        name, sl, p, fme_sad, fme_mv.x, fme_mv.y, exp_sad[sl][p], exp_x[sl][p], exp_y[sl][p]));
      end
    end
  endtask

  initial begin
    int cx[NC], cy[NC];
    for (int k = 0; k < 16; k++) begin sw_wr_data[k] = 0; cur_wr_data[k] = 0; end
    for (int i = 0; i < NC; i++) centers[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // The four-step example path: moves right; top-right; right.
    make_smooth(4, 10, -3, 6, -4);
    cx = '{0, 0, 0, 0}; cy = '{0, 0, 0, 0};
    search(1, cx, cy, 0, 38, "example path");

    // Range border: best match at the right edge of the range.
    make_smooth(3, 5, 0, 32, 0);
    cx = '{29, 0, 0, 0}; cy = '{0, 0, 0, 0};
    search(1, cx, cy, 1, -1, "border");

    // Random smooth and noisy windows, random centres (some outside the range).
    for (int t = 0; t < 40; t++) begin
      int nc;
      if (t % 4 == 3) make_noise();
      else make_smooth(int'($urandom_range(1, 12)), int'($urandom_range(1, 12)),
                       int'($urandom_range(0, 12)) - 6,
                       int'($urandom_range(0, 64)) - 32, int'($urandom_range(0, 32)) - 16);
      nc = int'($urandom_range(1, NC));
      for (int i = 0; i < NC; i++) begin
        cx[i] = int'($urandom_range(0, 70)) - 35;
        cy[i] = int'($urandom_range(0, 38)) - 19;
      end
      search(nc, cx, cy, t % 2, -1, $sformatf("random %0d", t));
    end

    // Sliding window: the macroblock advances 16 pixels at a time along a
    // strip; only the entering column group is written, the base advances.
    begin
      localparam int SL = 7;
      pix_t strip[H][W + 16*SL];
      int a, b, c;
      a = 3; b = 4; c = -2;
      for (int y = 0; y < H; y++) for (int x = 0; x < W + 16*SL; x++) strip[y][x] = tex(a, b, c, x, y);
      for (int i = 0; i < SL; i++) begin
        int tx, ty;
        sw_col_base = 3'(i % (W/16));
        for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) sw[y][x] = strip[y][16*i + x];
        tx = int'($urandom_range(0, 20)) - 10; ty = int'($urandom_range(0, 12)) - 6;
        for (int r = 0; r < 16; r++) for (int q = 0; q < 16; q++)
          cur[r][q] = strip[ty+SRY+r][16*i+tx+SRX+q] ^ 8'(($urandom_range(0, 3) == 0) ? 1 : 0);
        cx = '{0, tx/2, 0, 0}; cy = '{0, ty/2, 0, 0};
        if (i > 0) n_slide++;
        search(2, cx, cy, i % 2, -1, $sformatf("slide %0d", i), (i == 0) ? 0 : W/16 - 1);
      end
      sw_col_base = 0;
    end

    check(n_slide > 0,       "no window slide");
    check(n_sleep > 0 && n_gclk == n_en,
          $sformatf("gated clock: %0d edges for %0d enabled cycles, %0d sleeping cycles", n_gclk, n_en, n_sleep));
    check(n_fill > 0,        "no array fill");
    check(n_dir[DIR_UP] > 0 && n_dir[DIR_DOWN] > 0 && n_dir[DIR_LEFT] > 0 && n_dir[DIR_RIGHT] > 0,
          "a moving direction never used by the ROM");
    check(n_bubble > 0,      "no bubble move");
    check(n_long > 0,        "no 8-move ROM string");
    check(n_stop_center > 0, "no stop at the centre");
    check(n_stop_max > 0,    "no stop at the step limit");
    check(n_stop_border > 0, "no stop at the range border");
    check(n_clamp > 0,       "no clamped centre");
    check(n_multi > 0,       "no multi-centre search");
    check(n_store[0] > 0 && n_store[1] > 0, "a result slot never written");
    $display("mechanisms: fill=%0d up=%0d down=%0d left=%0d right=%0d bubble=%0d long=%0d stop_center=%0d stop_max=%0d stop_border=%0d clamp=%0d multi=%0d store0=%0d store1=%0d slide=%0d gated=%0d",
             n_fill, n_dir[0], n_dir[1], n_dir[2], n_dir[3], n_bubble, n_long, n_stop_center,
             n_stop_max, n_stop_border, n_clamp, n_multi, n_store[0], n_store[1], n_slide, n_sleep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
