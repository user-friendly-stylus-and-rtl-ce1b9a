// Testbench for draw_circle: random centres and rim points, some circles
// crossing the screen edge. The radius must be floor of the distance; every
// pixel must lie within half a pixel of that radius (|d^2 - r^2| <= r), be
// on screen, and the set must be closed under the eight symmetries (where
// the mirror is on screen) and match a software midpoint circle.
module tb_draw_circle;
  import cad_pkg::*;
  draw_circle dut (.clk, .rst, .cancel, .next, .pos, .load, .a_in, .b_in, .busy, .pending,
                   .pix_valid, .pix_pos, .done, .a_out, .b_out);
  `include "draw_if_tb.svh"
  function automatic logic onscr(input int x, input int y);
    return x >= 0 && x < 640 && y >= 0 && y < 480;
  endfunction
  initial begin
    int n_clip = 0;
    pos = '0; a_in = '0; b_in = '0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 200; i++) begin
      pos_t a, b, q;
      int dx, dy, r, clocks;
      logic got [pos_t];
      logic ref_set [pos_t];
      a = '{y: 9'($urandom_range(0, 479)), x: 10'($urandom_range(0, 639))};
      b = '{y: 9'($urandom_range(0, 479)), x: 10'($urandom_range(0, 639))};
      if (i % 2) begin
        b.x = 10'(int'(a.x) + $urandom_range(0, 60)); b.y = 9'(int'(a.y) + $urandom_range(0, 60));
        if (b.x > 639) b.x = 639;
        if (b.y > 479) b.y = 479;
      end
      got.delete(); ref_set.delete();
      draw(a, b, i % 3 == 0, clocks);
      dx = int'(b.x) - int'(a.x); dy = int'(b.y) - int'(a.y);
      r = 0;
      while ((r + 1) * (r + 1) <= dx * dx + dy * dy) r++;
      // software midpoint circle
      begin
        int x, y, d;
        x = 0; y = r; d = 1 - r;
        while (x <= y) begin
          int px [8], py [8];
          px = '{int'(a.x) + x, int'(a.x) - x, int'(a.x) + x, int'(a.x) - x, int'(a.x) + y, int'(a.x) - y, int'(a.x) + y, int'(a.x) - y};
          py = '{int'(a.y) + y, int'(a.y) + y, int'(a.y) - y, int'(a.y) - y, int'(a.y) + x, int'(a.y) + x, int'(a.y) - x, int'(a.y) - x};
          for (int k = 0; k < 8; k++)
            if (onscr(px[k], py[k])) begin q.y = 9'(py[k]); q.x = 10'(px[k]); ref_set[q] = 1; end
            else n_clip++;
          if (d < 0) d += 2 * x + 3;
          else begin d += 2 * (x - y) + 5; y--; end
          x++;
        end
      end
      foreach (pix[k]) begin
        int ex, ey, d2;
        got[pix[k]] = 1;
        ex = int'(pix[k].x) - int'(a.x); ey = int'(pix[k].y) - int'(a.y);
        d2 = ex * ex + ey * ey;
        chk(d2 - r * r <= r && r * r - d2 <= r, "within half a pixel of the radius");
      end
      foreach (got[p]) begin
        int ex, ey;
        ex = int'(p.x) - int'(a.x); ey = int'(p.y) - int'(a.y);
        q.y = 9'(int'(a.y) + ey); q.x = 10'(int'(a.x) - ex);
        if (onscr(int'(a.x) - ex, int'(a.y) + ey)) chk(got.exists(q), "x mirror");
        q.y = 9'(int'(a.y) + ex); q.x = 10'(int'(a.x) + ey);
        if (onscr(int'(a.x) + ey, int'(a.y) + ex)) chk(got.exists(q), "diagonal mirror");
      end
      chk(got.size() == ref_set.size(), $sformatf("pixels %0d exp %0d", got.size(), ref_set.size()));
      foreach (ref_set[p]) chk(got.exists(p), "reference pixel drawn");
    end
    chk(n_clip > 0, "some circles clipped at the screen edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
