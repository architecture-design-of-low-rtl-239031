// square_search_fsm_tb: tests the square search controller together with its
// moving-direction ROM and step counter. The testbench plays the datapath: a
// move issued in cycle t returns the 16x16 cost of its candidate three
// cycles later, from a quadratic cost surface. Checked: the published
// example (step 2 from a bottom-left end-point with the minimum on the right
// moves right, right, right, up, up; 16 + 8 + 5 + 6 + 3 = 38 line reads for
// four steps), and for random surfaces and centres that the candidates
// issued are exactly the 3x3 squares of a reference square search, that
// every move is a one-pixel step inside the range, the step count and the
// cycle count from start to done.
module square_search_fsm_tb;
  import ime_pkg::*;
  localparam int NC = 4, SRX = 32, SRY = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0; logic [2:0] num_centers = 0; mv_t centers[NC];
  logic busy, done, res_valid; sad_t res_sad16; mv_t res_mv;
  ep_t rom_ep; logic [2:0] rom_mp, mn; dir_t rom_dir, mv_dir; logic rom_last, sc_clr, sc_inc;
  logic md_clear, ag_load, mv_en, cand_valid; mv_t ag_load_mv, cand_mv;
  logic [15:0] reads; logic [7:0] steps;

  square_search_fsm dut (.*);
  move_dir_rom u_rom (.ep(rom_ep), .mp(rom_mp), .mn, .dir(rom_dir), .last(rom_last));
  step_counter u_sc (.clk, .rst_n, .clr(sc_clr), .inc(sc_inc), .mn);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ca, cb, cc, ctx, cty;
  function automatic int cost(int x, int y);
    return ca*(x-ctx)*(x-ctx) + cb*(y-cty)*(y-cty) + cc*(x-ctx)*(y-cty) + 1000;
  endfunction

  // datapath stand-in: three-cycle result pipeline
  logic v1, v2; mv_t m1, m2;
  always_ff @(posedge clk) begin
    v1 <= mv_en && cand_valid; m1 <= cand_mv;
    v2 <= v1; m2 <= m1;
    res_valid <= v2; res_mv <= m2; res_sad16 <= sad_t'(cost(int'(m2.x), int'(m2.y)));
  end

  // record issued candidates and moves
  bit issued[2*SRY+3][2*SRX+3];
  bit in_fill;
  mv_t prev;
  string step_path;
  string paths[$];
  always @(posedge clk) if (rst_n) begin
    if (ag_load) prev = ag_load_mv;
    if (sc_clr) step_path = "";
    if (mv_en) begin
      int ddx, ddy;
      ddx = int'(cand_mv.x) - int'(prev.x); ddy = int'(cand_mv.y) - int'(prev.y);
      check((ddx*ddx + ddy*ddy) == 1, "move is not a one-pixel step");
      prev = cand_mv;
      if (cand_valid) begin
        check(cand_mv.x >= -SRX && cand_mv.x <= SRX && cand_mv.y >= -SRY && cand_mv.y <= SRY,
              "candidate outside the search range");
        issued[cand_mv.y+SRY+1][cand_mv.x+SRX+1] = 1;
      end
      if (dut.state == dut.S_MOVE) begin
        step_path = {step_path, (mv_dir == DIR_UP) ? "U" : (mv_dir == DIR_DOWN) ? "D" :
                                 (mv_dir == DIR_LEFT) ? "L" : "R"};
        if (rom_last) paths.push_back(step_path);
      end
    end
  end

  bit expv[2*SRY+3][2*SRX+3];
  int msteps;
  function automatic bit better(int sa, int xa, int ya, int sb, int xb, int yb);
    if (sa != sb) return sa < sb;
    if (ya != yb) return ya < yb;
    return xa < xb;
  endfunction
  function automatic int clampi(int v, int lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction
  task automatic model(int cx0, int cy0);
    int cx, cy, bx, by, bs, s, step;
    bit vc[2*SRY+3][2*SRX+3];
    cx = clampi(cx0, SRX-1); cy = clampi(cy0, SRY-1); step = 1;
    forever begin
      for (int j = -1; j <= 1; j++) for (int i = -1; i <= 1; i++) begin
        vc[cy+j+SRY+1][cx+i+SRX+1] = 1; expv[cy+j+SRY+1][cx+i+SRX+1] = 1;
      end
      bs = -1;
      for (int y = -SRY; y <= SRY; y++) for (int x = -SRX; x <= SRX; x++)
        if (vc[y+SRY+1][x+SRX+1]) begin
          s = cost(x, y);
          if (bs < 0 || better(s, x, y, bs, bx, by)) begin bs = s; bx = x; by = y; end
        end
      if ((bx == cx && by == cy) || step >= 4 || bx > SRX-1 || bx < 1-SRX || by > SRY-1 || by < 1-SRY) break;
      cx = bx; cy = by; step++;
    end
    msteps += step;
  endtask

  task automatic run(int nc, int cx[NC], int cy[NC], string name, output int cyc);
    foreach (issued[i, j]) issued[i][j] = 0;
    foreach (expv[i, j]) expv[i][j] = 0;
    paths.delete();
    msteps = 0;
    for (int i = 0; i < nc; i++) model(cx[i], cy[i]);
    for (int i = 0; i < NC; i++) centers[i] = '{x: coord_t'(cx[i]), y: coord_t'(cy[i])};
    num_centers = 3'(nc);
    @(negedge clk); start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(int'(steps) == msteps, $sformatf("%s: steps %0d expected %0d", name, steps, msteps));
    check(cyc == 2 + 6*nc + int'(reads) + 4*(int'(steps)-nc),
          $sformatf("%s: %0d cycles, reads %0d steps %0d", name, cyc, reads, steps));
    begin
      int bad = 0;
      foreach (issued[i, j]) if (issued[i][j] != expv[i][j]) bad++;
      check(bad == 0, $sformatf("%s: %0d candidate positions differ from the square search", name, bad));
    end
  endtask

  initial begin
    int cx[NC], cy[NC], cyc;
    for (int i = 0; i < NC; i++) centers[i] = '0;
    repeat (3) @(negedge clk); rst_n = 1;

    ca = 2; cb = 9; cc = 4; ctx = 4; cty = -1;
    cx = '{0, 0, 0, 0}; cy = '{0, 0, 0, 0};
    run(1, cx, cy, "example", cyc);
    check(reads == 38, $sformatf("example: %0d reads, expected 38", reads));
    check(steps == 4, "example: four steps");
    check(paths.size() == 3 && paths[0] == "RRRUU",
          $sformatf("example: step 2 path %s", (paths.size() > 0) ? paths[0] : "none"));
    check(paths.size() == 3 && paths[1].len() == 6 && paths[2].len() == 3, "example: step 3/4 lengths");

    for (int t = 0; t < 60; t++) begin
      int nc;
      ca = int'($urandom_range(1, 4)); cb = int'($urandom_range(1, 4));
      cc = int'($urandom_range(0, 4)) - 2;
      ctx = int'($urandom_range(0, 80)) - 40; cty = int'($urandom_range(0, 40)) - 20;
      nc = int'($urandom_range(1, NC));
      for (int i = 0; i < NC; i++) begin
        cx[i] = int'($urandom_range(0, 70)) - 35; cy[i] = int'($urandom_range(0, 38)) - 19;
      end
      run(nc, cx, cy, $sformatf("random %0d", t), cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
