// End-to-end testbench for cad_system_top at its default (full) size, with
// the full 512K x 36 object memory and 512K x 9 frame memory models.
// A camera model sends decoded 4:2:2 fields in which a 3x3 red LED spot sits
// at the wanted stylus position; the first frame is a full 640x480 picture,
// later ones send only the lines and samples up to the spot (the handler
// counts whatever arrives, so positions are unchanged and simulation is
// much shorter). The stylus switch is pressed once the position has been
// reported. A monitor rebuilds the VGA picture from blank/vsync and the RGB.
// The run: reset (both memories flushed, toolbar copied to the screen), then
// toolbar clicks, a line, a rectangle, a circle, points with snap to grid and
// snap to point, select, move, recolour, copy, resize and delete, a frame without the
// LED, each checked in object memory and on the VGA picture.
// Each mechanism is counted when its effect is seen; any mechanism never
// seen counts as a failure.
module tb_cad_system_top;
  import cad_pkg::*;
  logic clk = 0, rst = 1;
  logic [9:0] vid_data = 0; logic vid_valid = 0, vid_f = 0, vid_v = 1, vid_h = 1;
  logic filt_load = 0; logic [9:0] y_min = 0, y_max = 0, cr_min = 0, cr_max = 0, cb_min = 0, cb_max = 0;
  logic click_in = 0;
  logic [18:0] zbt_addr; logic zbt_we_b, zbt_oe; logic [35:0] zbt_wdata, zbt_rdata;
  logic [18:0] fb_addr; color_t fb_wdata, fb_rdata; logic fb_we_b, fb_oe_b;
  logic [23:0] vga_rgb; logic vga_blank_b, vga_sync_b, vga_hsync, vga_vsync;
  logic stylus_valid, sel_valid, cmd_busy, display_busy, fifo_overflow, ready;
  command_t command; mode_t mode; color_t color;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cad_system_top dut (.*);
  zbt_sram_model #(.AW(19)) zbt (.clk, .addr(zbt_addr), .we_b(zbt_we_b), .wdata(zbt_wdata),
                                 .oe(zbt_oe), .rdata(zbt_rdata));
  frame_sram_model #(.AW(19)) fb (.clk, .addr(fb_addr), .wdata(fb_wdata), .we_b(fb_we_b),
                                  .oe_b(fb_oe_b), .rdata(fb_rdata));

  // ---------------- mechanisms ----------------
  typedef enum int {M_ZBT_FLUSH, M_FB_FLUSH, M_TOOLBAR, M_STYLUS, M_NO_LED, M_BUTTON, M_COLOR,
                    M_POINT, M_LINE, M_RECT, M_CIRCLE, M_SNAP_GRID, M_SNAP_POINT,
                    M_SELECT, M_HILITE, M_DELETE, M_MOVE, M_COPY, M_RESIZE, M_RECOLOR, M_FIFO,
                    M_VGA_OBJECT, M_VGA_GRID, M_VGA_CURSOR, M_VGA_ERASE, M_N} mech_t;
  int mech [M_N];
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 30) $display("FAIL %s", m); end
  endtask
  task automatic seen(input mech_t m, input logic c, input string msg);
    chk(c, msg);
    if (c) mech[m]++;
  endtask

  initial begin
    repeat (40000000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- VGA monitor ----------------
  logic [23:0] img [480][640];
  int vx = 0, vy = -1, n_frames = 0, n_pops = 0, n_fb_flush = 0;
  logic blank_q = 0, vs_q = 1;
  always @(posedge clk) begin
    blank_q <= vga_blank_b; vs_q <= vga_vsync;
    if (!vga_vsync && vs_q) begin vy = -1; n_frames++; end
    if (vga_blank_b && !blank_q) begin vx = 0; vy++; end
    if (vga_blank_b && vy >= 0 && vy < 480 && vx < 640) begin img[vy][vx] = vga_rgb; vx++; end
    if (dut.fifo_re && !dut.fifo_empty) n_pops++;
    if (dut.reset_sync && !fb_we_b) n_fb_flush++;
  end
  function automatic logic [23:0] rgb(input color_t c);
    return {c[8:6], 5'b0, c[5:3], 5'b0, c[2:0], 5'b0};
  endfunction
  // wait for two complete frames after the FIFO has emptied
  task automatic show();
    int f0;
    while (!dut.fifo_empty || cmd_busy) @(negedge clk);
    f0 = n_frames;
    while (n_frames < f0 + 2) @(negedge clk);
  endtask

  // ---------------- camera model ----------------
  task automatic comp(input logic [9:0] d);
    vid_data = d; vid_valid = 1; @(negedge clk); vid_valid = 0;
  endtask
  task automatic cam_frame(input int bx, input int by, input logic led, input logic full);
    for (int fld = 0; fld < 2; fld++) begin
      vid_f = fld[0]; vid_v = 1; vid_h = 1; repeat (6) @(negedge clk); vid_v = 0;
      for (int l = 0; l < 240; l++) begin
        int yy, np;
        yy = 2 * l + fld;
        vid_h = 1; repeat (3) @(negedge clk); vid_h = 0; @(negedge clk);
        np = full ? 640 : (led && yy >= by - 1 && yy <= by + 1) ? bx + 3 : 0;
        for (int p = 0; p < np; p += 2) begin
          logic in0, in1;
          in0 = led && yy >= by - 1 && yy <= by + 1 && p >= bx - 1 && p <= bx + 1;
          in1 = led && yy >= by - 1 && yy <= by + 1 && p + 1 >= bx - 1 && p + 1 <= bx + 1;
          comp((in0 || in1) ? 10'd300 : 10'd620);       // Cb
          comp(in0 ? 10'd900 : 10'd350);                // Y
          comp((in0 || in1) ? 10'd900 : 10'd500);       // Cr
          comp(in1 ? 10'd900 : 10'd350);                // Y
        end
      end
      vid_h = 1; repeat (4) @(negedge clk);
    end
    vid_v = 1; vid_f = 0;
    repeat (12) @(negedge clk);
  endtask
  logic full_next = 1;
  // put the stylus at (x,y): one camera frame, then the position must arrive
  task automatic stylus(input int x, input int y);
    cam_frame(x, y, 1'b1, full_next);
    full_next = 0;
    seen(M_STYLUS, stylus_valid && dut.sx == 10'(x) && dut.sy == 9'(y),
         $sformatf("stylus at (%0d,%0d) reported (%0d,%0d)", x, y, dut.sx, dut.sy));
  endtask
  task automatic settle();
    int idle = 0;
    while (idle < 30) begin @(negedge clk); idle = cmd_busy ? 0 : idle + 1; end
  endtask
  task automatic press(input int x, input int y);
    stylus(x, y);
    repeat (4) @(negedge clk);
    click_in = 1; repeat (6) @(negedge clk); click_in = 0;
    settle();
  endtask
  task automatic button(input int b);
    command_t c0; mode_t m0; color_t k0;
    c0 = command; m0 = mode; k0 = color;
    press(8, b * 32 + 16);
    if (b <= 8) seen(M_BUTTON, command == command_t'(b + 1), "button sets command");
    else if (b <= 11) seen(M_BUTTON, mode == mode_t'(b - 9), "button sets mode");
    else seen(M_COLOR, color != k0, "colour button");
  endtask
  function automatic pix_word_t word(input int x, input int y);
    pos_t p; p.x = 10'(x); p.y = 9'(y);
    return pix_word_t'(zbt.mem[p]);
  endfunction

  // ---------------- the run ----------------
  initial begin
    int t0, n;
    pix_word_t w;
    for (int i = 0; i < (1 << 19); i++) begin zbt.mem[i] = {4'h9, 32'($urandom)}; fb.mem[i] = 9'($urandom); end
    repeat (4) @(negedge clk); rst = 0;
    t0 = 0;
    while (!ready) begin @(negedge clk); t0++; end
    n = 0;
    for (int i = 0; i < (1 << 19); i += 509) if (zbt.mem[i] != '0) n++;
    seen(M_ZBT_FLUSH, t0 >= (1 << 19) && n == 0, "object memory flushed");
    seen(M_FB_FLUSH, n_fb_flush >= (1 << 19), "frame memory flushed");
    show();
    n = 0;
    for (int y = 0; y < 480; y++) for (int x = 0; x < 32; x++) if (img[y][x] == rgb(9'b010_010_010)) n++;
    seen(M_TOOLBAR, n > 5000 && n < 32 * 480, $sformatf("toolbar on screen (%0d background pixels)", n));
    seen(M_VGA_GRID, img[48][64] == rgb(9'b011_011_011) && img[49][64] == 24'h0, "grid dots on screen");
    // line, white
    button(1);
    press(100, 100); press(200, 150);
    w = word(150, 125);
    seen(M_LINE, w.occ && w.otype == OBJ_LINE && word(100, 100).occ && word(200, 150).occ, "line in memory");
    show();
    seen(M_VGA_OBJECT, img[100][100] == rgb(9'h1ff) && img[125][150] == rgb(9'h1ff), "line on screen");
    seen(M_FIFO, n_pops >= 101, "pixels passed through the FIFO");
    // rectangle, red
    button(12);
    button(2);
    press(300, 300); press(350, 340);
    seen(M_RECT, word(325, 300).otype == OBJ_RECT && word(350, 320).otype == OBJ_RECT && !word(325, 320).occ,
         "rectangle in memory");
    // circle
    button(3);
    press(450, 200); press(470, 200);
    seen(M_CIRCLE, word(470, 200).otype == OBJ_CIRCLE && word(450, 180).otype == OBJ_CIRCLE, "circle in memory");
    show();
    seen(M_VGA_OBJECT, img[320][350] == rgb(9'b111_000_000) && img[180][450] == rgb(9'b111_000_000),
         "rectangle and circle on screen");
    // points with snapping
    button(0);
    button(10);
    press(103, 205);
    seen(M_SNAP_GRID, word(96, 208).otype == OBJ_POINT && !word(103, 205).occ, "point snapped to grid");
    seen(M_POINT, word(96, 208).occ, "point drawn");
    button(11);
    press(203, 152);
    seen(M_SNAP_POINT, word(200, 150).otype == OBJ_POINT && !word(203, 152).occ, "point snapped to a drawn pixel");
    button(9);
    // a frame without the LED: position kept, nothing happens
    cam_frame(0, 0, 1'b0, 1'b0);
    seen(M_NO_LED, !stylus_valid && dut.u_cmd.cursor_pos.x == 10'd8, "no LED: position kept");
    show();
    seen(M_VGA_CURSOR, img[12 * 32 + 16][8] == rgb(9'b111_000_000) || img[9 * 32 + 16][8] == rgb(9'b111_000_000),
         "cursor on screen");
    // select the rectangle
    button(4);
    press(300, 320);
    seen(M_SELECT, sel_valid && word(300, 320).color == 9'b111_000_000, "rectangle selected");
    show();
    seen(M_HILITE, img[300][325] == rgb(SELECT_COLOR) && img[340][325] == rgb(SELECT_COLOR), "selection highlighted");
    // move it
    button(6);
    press(300, 300); press(400, 300);
    seen(M_MOVE, word(400, 300).otype == OBJ_RECT && word(450, 340).otype == OBJ_RECT && !word(300, 300).occ,
         "rectangle moved");
    show();
    seen(M_VGA_ERASE, img[320][300] == 24'h0 && img[320][450] != 24'h0, "old rectangle gone from screen");
    // select the moved rectangle and give it the next palette colour
    button(4);
    press(400, 320);
    button(12);
    seen(M_RECOLOR, sel_valid && color != 9'b111_000_000 && word(400, 320).color == color &&
         word(450, 300).color == color, "selected rectangle recoloured");
    // copy the line
    button(7);
    press(100, 100); press(100, 300);
    seen(M_COPY, word(100, 300).otype == OBJ_LINE && word(200, 350).otype == OBJ_LINE && word(100, 100).occ,
         "line copied");
    // resize the copy
    button(8);
    press(100, 300); press(150, 400);
    seen(M_RESIZE, word(150, 400).otype == OBJ_LINE && !word(200, 350).occ, "line resized");
    // delete the circle
    button(5);
    press(470, 200);
    seen(M_DELETE, !word(470, 200).occ && !word(450, 180).occ, "circle deleted");
    show();
    seen(M_VGA_ERASE, img[180][450] == 24'h0 && img[390][145] == rgb(9'h1ff), "deletion and resize on screen");
    chk(!fifo_overflow, "FIFO never overflowed");
    foreach (mech[m]) begin
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_t'(m)); end
    end
    $display("mechanisms: %p", mech);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
