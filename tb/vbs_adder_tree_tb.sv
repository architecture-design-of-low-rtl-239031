// vbs_adder_tree_tb: random and all-255 difference blocks; each of the 41
// SADs must equal the sum of the differences over that partition's pixels,
// summed directly from its position and size.
module vbs_adder_tree_tb;
  import ime_pkg::*;
  pix_t diff[16][16]; sad_t sad[41];
  int checks = 0, failures = 0;
  vbs_adder_tree dut (.*);
  function automatic void geom(int p, output int x0, output int y0, output int w, output int h);
    int i, j;
    if (p == 0)      begin x0 = 0; y0 = 0; w = 16; h = 16; end
    else if (p < 3)  begin x0 = 0; y0 = 8*(p-1); w = 16; h = 8; end
    else if (p < 5)  begin x0 = 8*(p-3); y0 = 0; w = 8; h = 16; end
    else if (p < 9)  begin i = p-5; x0 = 8*(i%2); y0 = 8*(i/2); w = 8; h = 8; end
    else if (p < 17) begin i = (p-9)/2; j = (p-9)%2; x0 = 8*(i%2); y0 = 8*(i/2)+4*j; w = 8; h = 4; end
    else if (p < 25) begin i = (p-17)/2; j = (p-17)%2; x0 = 8*(i%2)+4*j; y0 = 8*(i/2); w = 4; h = 8; end
    else             begin i = p-25; x0 = 4*(i%4); y0 = 4*(i/4); w = 4; h = 4; end
  endfunction
  initial begin
    for (int t = 0; t < 60; t++) begin
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++)
        diff[r][c] = (t == 0) ? 8'd255 : pix_t'($urandom);
      #1;
      for (int p = 0; p < 41; p++) begin
        int x0, y0, w, h, s;
        geom(p, x0, y0, w, h);
        s = 0;
        for (int r = y0; r < y0+h; r++) for (int c = x0; c < x0+w; c++) s += int'(diff[r][c]);
        checks++;
        if (int'(sad[p]) != s) begin failures++; $display("FAIL: part %0d %0d vs %0d", p, sad[p], s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
