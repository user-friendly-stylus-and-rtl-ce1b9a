// Testbench for command_top (drawing side): after the reset flush, draws a
// line, a rectangle (after a colour change), a circle, a circle clipped by
// the toolbar and points, and checks the screen model and object memory;
// then checks snap-to-grid and snap-to-point, and that toolbar clicks draw
// nothing.
module tb_command_top;
  `include "cmd_harness.svh"
  initial begin
    int n0;
    pix_word_t w;
    ctrl_word_t t;
    reset_and_flush();
    chk(command == CMD_NONE && mode == SNAP_NONE && color == 9'h1ff, "reset state");
    // line
    button(1);
    chk(command == CMD_LINE, "line command");
    chk(n_push == 0, "toolbar clicks draw nothing");
    click_at(100, 100);
    chk(n_push == 0, "first click only stores");
    click_at(200, 150);
    chk(n_push == 101 && count_color(9'h1ff) == 101, $sformatf("line pixels %0d", n_push));
    w = word(100, 100);
    chk(w.occ && w.otype == OBJ_LINE && w.num == 11'd1 && w.color == 9'h1ff, "line word at A");
    w = word(150, 125);
    chk(w.occ && w.num == 11'd1, "line word mid");
    t = ctrl_word_t'(zbt.mem[obj_table_addr(11'd1, 1'b0)]);
    chk(t.occ && t.otype == OBJ_LINE && t.pos == P(100, 100), "table A");
    t = ctrl_word_t'(zbt.mem[obj_table_addr(11'd1, 1'b1)]);
    chk(t.pos == P(200, 150), "table B");
    // colour, rectangle
    button(12);
    chk(color == 9'b111_000_000, "colour steps to red");
    button(2);
    click_at(350, 340); click_at(300, 300);
    chk(count_color(9'b111_000_000) == 2 * 51 + 2 * 39, "rectangle outline");
    chk(shown(300, 320) == 9'b111_000_000 && shown(350, 300) == 9'b111_000_000 && shown(320, 320) == 0,
        "rectangle edges, empty inside");
    w = word(325, 340);
    chk(w.otype == OBJ_RECT && w.num == 11'd2, "rect word");
    // circle r = 20
    button(12);
    button(3);
    click_at(450, 200); click_at(470, 200);
    chk(shown(470, 200) == 9'b000_111_000 && shown(430, 200) == 9'b000_111_000 &&
        shown(450, 180) == 9'b000_111_000 && shown(450, 220) == 9'b000_111_000, "circle extremes");
    chk(shown(450, 200) == 0, "circle centre empty");
    chk(word(450, 220).otype == OBJ_CIRCLE && word(450, 220).num == 11'd3, "circle word");
    // a circle crossing into the toolbar is clipped there
    click_at(40, 100); click_at(60, 100);
    n0 = 0;
    foreach (scr[p]) if (p.x < 32) n0++;
    chk(n0 == 0 && shown(60, 100) != 0 && shown(40, 80) != 0, "circle clipped at the toolbar");
    // points
    button(0);
    n0 = n_push;
    click_at(60, 400);
    chk(n_push == n0 + 1 && shown(60, 400) == 9'b000_111_000, "point");
    // snap to grid
    button(10);
    chk(mode == SNAP_GRID, "grid mode");
    click_at(103, 205);
    chk(word(96, 208).occ && word(96, 208).otype == OBJ_POINT, "point snapped to grid");
    chk(!word(103, 205).occ, "not at the raw position");
    click_at(617, 470);
    chk(word(624, 464).occ, "grid snap kept on screen");
    // snap to point: near the line's end (200,150)
    button(11);
    chk(mode == SNAP_POINT, "point mode");
    click_at(203, 152);
    w = word(200, 150);
    chk(w.otype == OBJ_POINT, "point snapped onto the nearest drawn pixel");
    chk(!word(203, 152).occ, "not at the raw position (snap to point)");
    // nothing within reach: unsnapped
    click_at(500, 450);
    chk(word(500, 450).otype == OBJ_POINT, "far click not snapped");
    // snapping a line's end points
    // (the second click is nearest the circle's top pixels, not (450,180))
    button(1);
    n0 = n_push;
    begin
      logic was [pos_t];
      foreach (scr[p]) was[p] = 1;
      click_at(352, 297); click_at(448, 183);
      t = ctrl_word_t'(zbt.mem[obj_table_addr(11'd10, 1'b0)]);
      chk(t.otype == OBJ_LINE && t.pos == P(350, 300), "line start snapped to the rectangle corner");
      t = ctrl_word_t'(zbt.mem[obj_table_addr(11'd10, 1'b1)]);
      chk(was.exists(t.pos) && word(t.pos.x, t.pos.y).otype == OBJ_LINE &&
          (int'(t.pos.x) - 448) ** 2 + (int'(t.pos.y) - 183) ** 2 <= 13, "line end snapped to a circle pixel");
    end
    button(9);
    chk(mode == SNAP_NONE, "no snapping");
    chk(!busy && !flushing, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
