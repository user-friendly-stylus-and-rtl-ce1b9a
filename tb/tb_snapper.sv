// Testbench for snapper with stand-in snapping modules that answer after a
// random delay with a known position: checks that each mode routes the
// click to the right module (or none), that toolbar clicks are never
// snapped, that click_out carries the snapped position, and that clicks
// during a snap are dropped.
module tb_snapper;
  import cad_pkg::*;
  logic clk = 0, rst = 1, click = 0, grid_next, point_next, busy, click_out;
  logic grid_done = 0, point_done = 0;
  pos_t pos, snap_in, pos_out;
  pos_t grid_pos, point_pos;
  mode_t mode;
  int checks = 0, failures = 0, n_g = 0, n_p = 0, n_out = 0;
  pos_t last_out;
  always #5 clk = ~clk;
  snapper dut (.clk, .rst, .click, .pos, .mode, .grid_next, .grid_done, .grid_pos, .point_next,
    .point_done, .point_pos, .snap_in, .busy, .click_out, .pos_out);
  assign grid_pos  = '{y: snap_in.y ^ 9'h1, x: snap_in.x ^ 10'h1};
  assign point_pos = '{y: snap_in.y ^ 9'h2, x: snap_in.x ^ 10'h2};
  always @(posedge clk) begin
    if (grid_next) n_g++;
    if (point_next) n_p++;
    if (click_out) begin n_out++; last_out = pos_out; end
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    pos = '0; mode = SNAP_NONE;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 600; i++) begin
      int g0, p0, o0, dly;
      pos_t e;
      mode = mode_t'($urandom_range(0, 2));
      pos = '{y: 9'($urandom_range(0, 479)), x: 10'($urandom_range(0, 639))};
      g0 = n_g; p0 = n_p; o0 = n_out;
      click = 1; @(negedge clk); click = 0;
      dly = $urandom_range(1, 6);
      if (pos.x < 32 || mode == SNAP_NONE) e = pos;
      else if (mode == SNAP_GRID) e = '{y: pos.y ^ 9'h1, x: pos.x ^ 10'h1};
      else e = '{y: pos.y ^ 9'h2, x: pos.x ^ 10'h2};
      if (!(pos.x < 32 || mode == SNAP_NONE)) begin
        repeat (dly) begin
          // a click while busy must be ignored
          click = 1; @(negedge clk); click = 0;
        end
        if (mode == SNAP_GRID) grid_done = 1; else point_done = 1;
        @(negedge clk); grid_done = 0; point_done = 0;
      end
      @(negedge clk); @(negedge clk);
      checks++;
      if (n_out != o0 + 1 || last_out != e) begin
        failures++; if (failures < 10) $display("FAIL mode %0d pos %h out %h exp %h n %0d", mode, pos, last_out, e, n_out - o0);
      end
      checks++;
      if (n_g - g0 != (mode == SNAP_GRID && pos.x >= 32) || n_p - p0 != (mode == SNAP_POINT && pos.x >= 32)) begin
        failures++; $display("FAIL routing");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
