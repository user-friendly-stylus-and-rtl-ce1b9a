// Testbench for edit_cmds, run inside command_top with the ZBT SRAM model:
// draws a line (object 1) and a rectangle (object 2), then checks select
// (highlight on screen, memory unchanged, previous selection restored),
// move, copy, resize, delete and recolour against the screen model, the pixel words
// and the object table, and that a click on empty space selects nothing.
module tb_edit_cmds;
  `include "cmd_harness.svh"
  localparam color_t WHITE = 9'h1ff, RED = 9'b111_000_000;
  function automatic int line_pixels_with(input color_t c, input int x0, input int y0, input int x1, input int y1);
    // counts screen pixels of colour c inside the bounding box
    int n = 0;
    foreach (scr[p])
      if (scr[p] == c && p.x >= x0 && p.x <= x1 && p.y >= y0 && p.y <= y1) n++;
    return n;
  endfunction
  initial begin
    ctrl_word_t t;
    pix_word_t w;
    int n;
    reset_and_flush();
    button(1); click_at(100, 100); click_at(200, 150);          // object 1, white line
    button(12); button(2); click_at(300, 300); click_at(350, 340); // object 2, red rectangle
    // select the line
    button(4);
    chk(command == CMD_SELECT, "select command");
    click_at(150, 125);
    chk(sel_valid, "line selected");
    chk(line_pixels_with(SELECT_COLOR, 100, 100, 200, 150) == 101, "line highlighted");
    w = word(150, 125);
    chk(w.color == WHITE && w.num == 11'd1, "memory keeps the object's colour");
    // select the rectangle: the line goes back to white
    click_at(300, 320);
    chk(line_pixels_with(WHITE, 100, 100, 200, 150) == 101, "old selection restored");
    chk(line_pixels_with(SELECT_COLOR, 300, 300, 350, 340) == 180, "rectangle highlighted");
    // click on nothing
    click_at(500, 50);
    chk(!sel_valid, "empty click selects nothing");
    chk(line_pixels_with(RED, 300, 300, 350, 340) == 180, "rectangle restored");
    // move the rectangle: A -> (400,200), B follows
    button(6);
    click_at(350, 340); click_at(400, 200);
    chk(line_pixels_with(9'd0, 300, 300, 350, 340) == 180 && !word(300, 300).occ && !word(350, 340).occ,
        "old rectangle erased");
    chk(word(400, 200).occ && word(450, 240).occ && word(450, 240).num == 11'd2 &&
        word(425, 240).otype == OBJ_RECT, "rectangle drawn at the new place");
    chk(shown(400, 220) != 0 && shown(450, 200) != 0, "moved rectangle on screen");
    t = ctrl_word_t'(zbt.mem[obj_table_addr(11'd2, 1'b0)]);
    chk(t.pos == P(400, 200) && t.otype == OBJ_RECT, "table A updated");
    t = ctrl_word_t'(zbt.mem[obj_table_addr(11'd2, 1'b1)]);
    chk(t.pos == P(450, 240), "table B updated");
    // copy the line to start at (100,300): new object 3
    button(7);
    click_at(100, 100); click_at(100, 300);
    chk(word(100, 100).num == 11'd1 && word(200, 150).occ, "original kept");
    chk(word(100, 300).num == 11'd3 && word(200, 350).num == 11'd3 && word(150, 325).otype == OBJ_LINE,
        "copy drawn with a new number");
    t = ctrl_word_t'(zbt.mem[obj_table_addr(11'd3, 1'b1)]);
    chk(t.pos == P(200, 350) && t.color == WHITE, "copy in the table");
    // resize the copy: B -> (150,400)
    button(8);
    click_at(150, 325); click_at(150, 400);
    chk(!word(200, 350).occ && shown(200, 350) == 0, "old end erased");
    chk(word(150, 400).num == 11'd3 && word(125, 350).num == 11'd3, "resized line drawn");
    t = ctrl_word_t'(zbt.mem[obj_table_addr(11'd3, 1'b0)]);
    chk(t.pos == P(100, 300), "resize keeps A");
    t = ctrl_word_t'(zbt.mem[obj_table_addr(11'd3, 1'b1)]);
    chk(t.pos == P(150, 400), "resize sets B");
    // delete the original line
    button(5);
    click_at(200, 150);
    n = 0;
    for (int x = 100; x <= 200; x++) for (int y = 100; y <= 150; y++) if (word(x, y).occ) n++;
    chk(n == 0 && line_pixels_with(9'd0, 100, 100, 200, 150) == 101, "line deleted");
    chk(zbt.mem[obj_table_addr(11'd1, 1'b0)] == '0 && zbt.mem[obj_table_addr(11'd1, 1'b1)] == '0,
        "table entry cleared");
    chk(word(100, 300).num == 11'd3 && word(400, 200).num == 11'd2, "other objects untouched");
    // recolour: select the rectangle, press the colour button
    button(4);
    click_at(400, 220);
    chk(sel_valid, "rectangle selected again");
    button(12);
    chk(color == 9'b000_111_000, "colour steps to green");
    w = word(400, 220);
    chk(w.color == 9'b000_111_000 && w.num == 11'd2, "recoloured in memory");
    t = ctrl_word_t'(zbt.mem[obj_table_addr(11'd2, 1'b0)]);
    chk(t.color == 9'b000_111_000 && t.pos == P(400, 200), "recoloured in the table");
    chk(shown(450, 220) == SELECT_COLOR, "still highlighted");
    click_at(500, 50);
    chk(shown(450, 220) == 9'b000_111_000 && shown(425, 240) == 9'b000_111_000, "shown in the new colour");
    // a command change in the middle of a move cancels it
    button(6);
    click_at(400, 220);
    button(0);
    chk(!busy && word(400, 220).num == 11'd2, "cancelled move leaves the object");
    chk(!flushing, "no flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
