// cad_system_top: the complete stylus-driven drawing system.
// A camera watches the drawing surface; the video input finds the red LED
// of the stylus in each camera frame and reports its centre. The CAD command
// subsystem takes that position and the stylus switch as its pointer, runs
// the drawing and editing commands against its object memory, and sends every
// pixel it changes through a 1024-entry FIFO to the video output, which keeps
// a frame memory, overlays grid and cursor, and drives a 640x480 VGA display
// that is viewed on (or projected onto) the same surface.
// The camera position is used directly as the screen position; a frame with
// no LED pixel gives an out-of-range position, so the command side keeps the
// last good one. One clock (the 25 MHz pixel clock) runs everything; the two
// external memories and the video DAC are outside this module, their pins
// brought out as ports. A reset flushes both memories before drawing starts.
module cad_system_top
  import cad_pkg::*;
#(
  parameter int unsigned FLUSH_AW = 19
) (
  input  logic        clk,
  input  logic        rst,
  // camera (decoded video stream)
  input  logic [9:0]  vid_data,
  input  logic        vid_valid,
  input  logic        vid_f, vid_v, vid_h,
  input  logic        filt_load,
  input  logic [9:0]  y_min, y_max, cr_min, cr_max, cb_min, cb_max,
  // stylus switch
  input  logic        click_in,
  // object memory (ZBT SRAM, 512K x 36)
  output logic [18:0] zbt_addr,
  output logic        zbt_we_b,
  output logic [35:0] zbt_wdata,
  output logic        zbt_oe,
  input  logic [35:0] zbt_rdata,
  // frame memory (512K x 9)
  output logic [18:0] fb_addr,
  output color_t      fb_wdata,
  output logic        fb_we_b,
  output logic        fb_oe_b,
  input  color_t      fb_rdata,
  // VGA DAC
  output logic [23:0] vga_rgb,
  output logic        vga_blank_b, vga_sync_b, vga_hsync, vga_vsync,
  // status
  output logic        stylus_valid,
  output command_t    command,
  output mode_t       mode,
  output color_t      color,
  output logic        sel_valid,
  output logic        cmd_busy,
  output logic        display_busy,
  output logic        fifo_overflow,
  output logic        ready
);
  logic [9:0] sx;
  logic [8:0] sy;
  logic       strobe, flushing, reset_sync;
  logic       fifo_wr, fifo_re, fifo_empty, fifo_full;
  pixel_info_t fifo_din, fifo_dout;
  logic [10:0] fifo_count;
  pos_t       cursor;

  video_input u_vin (.clk, .rst, .vid_data, .vid_valid, .f(vid_f), .v(vid_v), .h(vid_h),
    .filt_load, .y_min, .y_max, .cr_min, .cr_max, .cb_min, .cb_max,
    .stylus_x(sx), .stylus_y(sy), .stylus_valid, .stylus_strobe(strobe));

  command_top #(.FLUSH_AW(FLUSH_AW)) u_cmd (.clk, .rst, .click_in,
    .pos_x_in(stylus_valid ? sx : 10'h3FF), .pos_y_in({1'b0, sy}),
    .sram_addr(zbt_addr), .sram_we_b(zbt_we_b), .sram_wdata(zbt_wdata), .sram_oe(zbt_oe),
    .sram_rdata(zbt_rdata), .fifo_wr, .fifo_din,
    .cursor_pos(cursor), .command, .mode, .color, .sel_valid, .busy(cmd_busy), .flushing);

  pixel_fifo #(.WIDTH(28), .DEPTH(1024)) u_fifo (.clk, .rst, .wr_en(fifo_wr), .din(fifo_din),
    .rd_en(fifo_re), .dout(fifo_dout), .empty(fifo_empty), .full(fifo_full),
    .overflow(fifo_overflow), .count(fifo_count));

  video_output u_vout (.clk, .comb_reset(rst), .reset_sync, .fifo_re, .fifo_data(fifo_dout),
    .fifo_empty, .sram_addr(fb_addr), .sram_wdata(fb_wdata), .sram_we_b(fb_we_b),
    .sram_oe_b(fb_oe_b), .sram_rdata(fb_rdata), .stylus_pos(cursor), .display_busy,
    .vga_rgb, .vga_blank_b, .vga_sync_b, .vga_hsync, .vga_vsync);

  assign ready = !flushing && !reset_sync;
  wire unused = strobe ^ fifo_full ^ (^fifo_count);
endmodule
