// Testbench for area_map: clicks on every toolbar button and at random
// drawing positions; checks the command, snap mode and colour registers and
// the draw_click/cmd_changed pulses against the button table.
module tb_area_map;
  import cad_pkg::*;
  logic clk = 0, rst = 1, click = 0, cmd_changed, snap_force_mem, draw_click;
  pos_t pos, draw_pos;
  command_t command;
  mode_t mode;
  color_t color;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  area_map dut (.clk, .rst, .click, .pos, .command, .cmd_changed, .mode, .color, .snap_force_mem,
                .draw_click, .draw_pos);
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask
  color_t palette [8] = '{9'o777, 9'o700, 9'o070, 9'o007, 9'o770, 9'o077, 9'o707, 9'o740};
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    command_t ec;
    mode_t em;
    int ci;
    pos = '0;
    repeat (3) @(negedge clk); rst = 0;
    ec = CMD_NONE; em = SNAP_NONE; ci = 0;
    chk(command == CMD_NONE && mode == SNAP_NONE && color == 9'o777, "reset state");
    for (int i = 0; i < 2000; i++) begin
      int b;
      logic tool;
      tool = $urandom_range(0, 1);
      if (tool) pos = '{y: 9'($urandom_range(0, 479)), x: 10'($urandom_range(0, 31))};
      else pos = '{y: 9'($urandom_range(0, 479)), x: 10'($urandom_range(32, 639))};
      b = pos.y / 32;
      click = 1; @(negedge clk); click = 0;
      if (tool) begin
        if (b <= 8) ec = command_t'(b + 1);
        else if (b == 9) em = SNAP_NONE;
        else if (b == 10) em = SNAP_GRID;
        else if (b == 11) em = SNAP_POINT;
        else if (b == 12) ci = (ci + 1) % 8;
      end
      chk(cmd_changed == (tool && b <= 8), "cmd_changed");
      chk(draw_click == !tool && (tool || draw_pos == pos), "draw_click");
      chk(command == ec && mode == em && color == palette[ci], "registers");
      chk(snap_force_mem == (em == SNAP_POINT), "snap_force_mem");
      @(negedge clk);
      chk(!draw_click && !cmd_changed, "pulses one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
