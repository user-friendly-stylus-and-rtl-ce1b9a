// Testbench for snap_to_grid: random positions, expected nearest grid point
// (spacing 16, ties up, kept on screen) computed here; one-clock latency.
module tb_snap_to_grid;
  import cad_pkg::*;
  logic clk = 0, rst = 1, next = 0, busy, done;
  pos_t pos, sp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  snap_to_grid dut (.clk, .rst, .next, .pos, .busy, .done, .snap_pos(sp));
  function automatic int near(input int v, input int lim);
    int r;
    r = ((v + 8) / 16) * 16;
    if (r >= lim) r -= 16;
    return r;
  endfunction
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    pos = '0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      int x, y;
      x = $urandom_range(0, 639); y = $urandom_range(0, 479);
      if (i < 640) x = i;
      if (i < 480) y = i;
      pos = '{y: 9'(y), x: 10'(x)}; next = 1;
      @(negedge clk); next = 0;
      checks++;
      if (!done || sp.x != 10'(near(x, 640)) || sp.y != 9'(near(y, 480))) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) -> (%0d,%0d) done=%0d", x, y, sp.x, sp.y, done);
      end
      // the nearest grid point is never more than 8 away
      checks++;
      if ((x > sp.x ? x - sp.x : sp.x - x) > 8 && x < 632) begin failures++; $display("FAIL far"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
