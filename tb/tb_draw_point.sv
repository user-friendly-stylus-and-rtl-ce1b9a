// Testbench for draw_point: each click or load must give exactly one pixel
// at that position, then done.
module tb_draw_point;
  import cad_pkg::*;
  draw_point dut (.clk, .rst, .cancel, .next, .pos, .load, .a_in, .b_in, .busy, .pending,
                  .pix_valid, .pix_pos, .done, .a_out, .b_out);
  `include "draw_if_tb.svh"
  initial begin
    pos = '0; a_in = '0; b_in = '0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      pos_t p;
      int c;
      p = '{y: 9'($urandom_range(0, 479)), x: 10'($urandom_range(0, 639))};
      pix.delete();
      if (i % 2) begin a_in = p; load = 1; @(negedge clk); load = 0; end
      else begin pos = p; next = 1; @(negedge clk); next = 0; end
      c = 0;
      while (!done && c < 10) begin @(negedge clk); c++; end
      chk(done, "done");
      chk(pix.size() == 1 && pix[0] == p, "one pixel at the point");
      chk(a_out == p && b_out == p, "control points");
      @(negedge clk);
      chk(!busy, "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
