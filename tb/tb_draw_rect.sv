// Testbench for draw_rect: random corner pairs in any order (and degenerate
// ones: a point, a horizontal or vertical segment); the emitted pixels must
// be exactly the set of outline pixels, each once, one per clock.
module tb_draw_rect;
  import cad_pkg::*;
  draw_rect dut (.clk, .rst, .cancel, .next, .pos, .load, .a_in, .b_in, .busy, .pending,
                 .pix_valid, .pix_pos, .done, .a_out, .b_out);
  `include "draw_if_tb.svh"
  initial begin
    pos = '0; a_in = '0; b_in = '0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      pos_t a, b;
      int xl, xh, yl, yh, clocks;
      logic seen [pos_t];
      int n_exp;
      a = '{y: 9'($urandom_range(0, 479)), x: 10'($urandom_range(0, 639))};
      b = '{y: 9'($urandom_range(0, 479)), x: 10'($urandom_range(0, 639))};
      seen.delete();
      if (i % 10 == 0) b = a;
      if (i % 10 == 1) b.y = a.y;
      if (i % 10 == 2) b.x = a.x;
      if (i % 10 == 3) begin b.x = a.x + 1; b.y = a.y + 1; end
      draw(a, b, i % 2 == 1, clocks);
      xl = (a.x < b.x) ? a.x : b.x; xh = (a.x < b.x) ? b.x : a.x;
      yl = (a.y < b.y) ? a.y : b.y; yh = (a.y < b.y) ? b.y : a.y;
      n_exp = 0;
      for (int x = xl; x <= xh; x++)
        for (int y = yl; y <= yh; y++)
          if (x == xl || x == xh || y == yl || y == yh) n_exp++;
      foreach (pix[k]) begin
        chk(!seen.exists(pix[k]), "pixel drawn once");
        seen[pix[k]] = 1;
        chk((pix[k].x == xl || pix[k].x == xh || pix[k].y == yl || pix[k].y == yh) &&
            pix[k].x >= xl && pix[k].x <= xh && pix[k].y >= yl && pix[k].y <= yh, "on outline");
      end
      chk(pix.size() == n_exp, $sformatf("count %0d exp %0d", pix.size(), n_exp));
      chk(last_pix_t - first_pix_t == n_exp - 1, "one pixel per clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
