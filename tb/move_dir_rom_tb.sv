// move_dir_rom_tb: walks every (end-point, min-point) string of the ROM and
// checks it geometrically: one-pixel moves that stay inside the previous and
// the new 3x3 squares, every new candidate visited, the walk ending on a
// corner of the new square with last high exactly on the final move, and the
// length: 3 moves for an edge min-point on the end-point's side, 5 for one
// on the far side, 6 for a corner min-point, 8 when it is diagonally
// opposite the end-point. Also checks the published example: end-point
// bottom-left, min-point right gives right, right, right, up, up.
module move_dir_rom_tb;
  import ime_pkg::*;
  ep_t ep; logic [2:0] mp, mn; dir_t dir; logic last;
  int checks = 0, failures = 0;
  move_dir_rom dut (.*);
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic bit in_sq(int x, int y, int cx, int cy);
    return x >= cx-1 && x <= cx+1 && y >= cy-1 && y <= cy+1;
  endfunction
  initial begin
    int mdx[8] = '{-1, 0, 1, -1, 1, -1, 0, 1};
    int mdy[8] = '{-1, -1, -1, 0, 0, 1, 1, 1};
    for (int e = 0; e < 4; e++) for (int m = 0; m < 8; m++) begin
      int x, y, cx, cy, n, explen;
      bit seen[7][7];
      string s;
      foreach (seen[i, j]) seen[i][j] = 0;
      x = (e % 2) ? 1 : -1; y = (e / 2) ? 1 : -1;
      cx = mdx[m]; cy = mdy[m];
      ep = ep_t'(e); mp = 3'(m);
      n = 0; s = "";
      for (int k = 0; k < 8; k++) begin
        mn = 3'(k); #1;
        n++;
        case (dir)
          DIR_UP: y--; DIR_DOWN: y++; DIR_LEFT: x--; default: x++;
        endcase
        s = {s, (dir == DIR_UP) ? "U" : (dir == DIR_DOWN) ? "D" : (dir == DIR_LEFT) ? "L" : "R"};
        check(in_sq(x, y, 0, 0) || in_sq(x, y, cx, cy), $sformatf("ep %0d mp %0d leaves the squares", e, m));
        seen[y+3][x+3] = 1;
        if (last) break;
      end
      check(last, $sformatf("ep %0d mp %0d: no last flag", e, m));
      check((x == cx-1 || x == cx+1) && (y == cy-1 || y == cy+1), $sformatf("ep %0d mp %0d: ends off a corner", e, m));
      for (int j = -1; j <= 1; j++) for (int i = -1; i <= 1; i++)
        if (!in_sq(cx+i, cy+j, 0, 0))
          check(seen[cy+j+3][cx+i+3], $sformatf("ep %0d mp %0d: misses (%0d,%0d)", e, m, cx+i, cy+j));
      if (cx == 0 || cy == 0) begin
        int exs, eys;
        exs = (e % 2) ? 1 : -1; eys = (e / 2) ? 1 : -1;
        explen = ((cx != 0 && cx == exs) || (cy != 0 && cy == eys)) ? 3 : 5;
      end else begin
        explen = (cx == ((e % 2) ? -1 : 1) && cy == ((e / 2) ? -1 : 1)) ? 8 : 6;
      end
      check(n == explen, $sformatf("ep %0d mp %0d: %0d moves (%s), expected %0d", e, m, n, s, explen));
      if (e == EP_BL && m == 4) check(s == "RRRUU", $sformatf("example string %s", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
