// video_input: finds the stylus LED in the camera picture, one result a frame.
// No frame buffer is used: every pixel is classified as it streams in, and
// the positions of passing pixels are summed. At the end of each frame the
// sums are divided by the number of passing pixels, giving the centroid,
// which is loaded into the output register.
// Structure (as in the document's block diagram): video handler -> Y/Cr/Cb
// registers -> comparator (with the filter value register) -> FSM; the pixel
// position goes through a 4-stage pipeline to the centroid calculator; the
// FSM's load enable writes the output register.
// `stylus_x/y` are camera coordinates and `stylus_valid` says that the
// last frame had at least one passing pixel. `stylus_strobe` pulses when a new
// result is loaded, a few cycles after the frame's end.
module video_input #(
  parameter int unsigned XW = 10,
  parameter int unsigned YW = 9,
  parameter int unsigned CW = 19
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [9:0]    vid_data,
  input  logic          vid_valid,
  input  logic          f, v, h,
  input  logic          filt_load,
  input  logic [9:0]    y_min, y_max, cr_min, cr_max, cb_min, cb_max,
  output logic [XW-1:0] stylus_x,
  output logic [YW-1:0] stylus_y,
  output logic          stylus_valid,
  output logic          stylus_strobe
);
  logic [9:0] yv, crv, cbv;
  logic [9:0] fy_min, fy_max, fcr_min, fcr_max, fcb_min, fcb_max;
  logic       cmp_en, frame_done, pass;
  logic [XW-1:0] px, px_d, cx;
  logic [YW-1:0] py, py_d, cy;
  logic acc_en, div_en, out_le, clr, cvalid;
  logic [CW-1:0] n_passed;

  video_handler #(.XW(XW), .YW(YW)) u_handler (
    .clk, .rst, .vid_data, .vid_valid, .f, .v, .h,
    .y_val(yv), .cr_val(crv), .cb_val(cbv), .cmp_en, .pos_x(px), .pos_y(py), .frame_done);

  filter_reg u_filter (
    .clk, .rst, .load(filt_load),
    .y_min_in(y_min), .y_max_in(y_max), .cr_min_in(cr_min), .cr_max_in(cr_max),
    .cb_min_in(cb_min), .cb_max_in(cb_max),
    .y_min(fy_min), .y_max(fy_max), .cr_min(fcr_min), .cr_max(fcr_max),
    .cb_min(fcb_min), .cb_max(fcb_max));

  color_comparator u_cmp (
    .clk, .rst, .en(cmp_en), .y(yv), .cr(crv), .cb(cbv),
    .y_min(fy_min), .y_max(fy_max), .cr_min(fcr_min), .cr_max(fcr_max),
    .cb_min(fcb_min), .cb_max(fcb_max), .pass);

  pipe_delay #(.WIDTH(XW + YW), .DEPTH(4)) u_pipe (
    .clk, .rst, .d({py, px}), .q({py_d, px_d}));

  video_input_fsm #(.CW(CW)) u_fsm (
    .clk, .rst, .pass, .frame_done, .acc_en, .div_en, .out_le, .clr, .n_passed);

  centroid_calc #(.XW(XW), .YW(YW), .CW(CW)) u_centroid (
    .clk, .rst, .clr, .acc_en, .x(px_d), .y(py_d), .div_en, .n_passed,
    .cx, .cy, .valid(cvalid));

  // output register
  always_ff @(posedge clk) begin
    if (rst) begin
      stylus_x <= '0; stylus_y <= '0; stylus_valid <= 1'b0; stylus_strobe <= 1'b0;
    end else begin
      stylus_strobe <= out_le;
      if (out_le) begin
        stylus_x <= cx; stylus_y <= cy; stylus_valid <= cvalid;
      end
    end
  end
endmodule
