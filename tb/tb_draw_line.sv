// Testbench for draw_line: random lines in all directions (plus vertical,
// horizontal, 45-degree and single-point ones), drawn by two clicks or by
// load. Checked independently of the algorithm: the pixel count is
// max(|dx|,|dy|)+1, the ends are the end points, each step moves one pixel
// along the major axis and at most one along the other, every pixel lies
// within half a pixel of the ideal line, and one pixel comes per clock.
module tb_draw_line;
  import cad_pkg::*;
  draw_line dut (.clk, .rst, .cancel, .next, .pos, .load, .a_in, .b_in, .busy, .pending,
                 .pix_valid, .pix_pos, .done, .a_out, .b_out);
  `include "draw_if_tb.svh"
  function automatic int iabs(input int v); return v < 0 ? -v : v; endfunction
  initial begin
    int n_vert = 0, n_horiz = 0, n_ang = 0;
    pos = '0; a_in = '0; b_in = '0;
    repeat (3) @(negedge clk); rst = 0;
    // a click, then a command change: the start point must be forgotten
    pos = '{y: 9'd5, x: 10'd5}; next = 1; @(negedge clk); next = 0; @(negedge clk);
    cancel = 1; @(negedge clk); cancel = 0; @(negedge clk);
    chk(!pending, "cancel clears start point");
    for (int i = 0; i < 400; i++) begin
      pos_t a, b;
      int x0, y0, x1, y1, dx, dy, n, clocks, major;
      a = '{y: 9'($urandom_range(0, 479)), x: 10'($urandom_range(0, 639))};
      b = '{y: 9'($urandom_range(0, 479)), x: 10'($urandom_range(0, 639))};
      case (i % 8)
        0: b.x = a.x;
        1: b.y = a.y;
        2: b = a;
        3: begin b.x = (a.x > 100) ? a.x - 100 : a.x + 100; b.y = (a.y > 100) ? a.y - 100 : a.y + 100; end
        default: ;
      endcase
      if (a.x == b.x) n_vert++; else if (a.y == b.y) n_horiz++; else n_ang++;
      draw(a, b, i % 3 == 0, clocks);
      // expected: drawn from the end with the smaller x
      if (a.x <= b.x) begin x0 = a.x; y0 = a.y; x1 = b.x; y1 = b.y; end
      else begin x0 = b.x; y0 = b.y; x1 = a.x; y1 = a.y; end
      dx = x1 - x0; dy = y1 - y0;
      major = (dx >= iabs(dy)) ? dx : iabs(dy);
      n = major + 1;
      chk(pix.size() == n, $sformatf("count %0d exp %0d", pix.size(), n));
      chk(last_pix_t - first_pix_t == n - 1, "one pixel per clock");
      if (pix.size() == n) begin
        chk(pix[0].x == x0 && pix[0].y == y0 && pix[n-1].x == x1 && pix[n-1].y == y1, "ends");
        for (int k = 0; k < n; k++) begin
          int px, py, err2;
          px = pix[k].x; py = pix[k].y;
          err2 = 2 * iabs((py - y0) * dx - (px - x0) * dy);
          chk(err2 <= major, "within half a pixel");
          if (k > 0) begin
            int sx, sy;
            sx = px - int'(pix[k-1].x); sy = py - int'(pix[k-1].y);
            if (dx >= iabs(dy)) chk(sx == 1 && iabs(sy) <= 1, "x-major step");
            else chk(iabs(sx) <= 1 && iabs(sy) == 1, "y-major step");
          end
        end
      end
    end
    chk(n_vert > 0 && n_horiz > 0 && n_ang > 0, "all three line kinds drawn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
