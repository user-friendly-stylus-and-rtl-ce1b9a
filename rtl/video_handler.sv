// video_handler: turns the decoded camera stream into pixels with positions.
// Input is one 10-bit component per valid cycle in the 4:2:2 order Cb, Y, Cr,
// Y, with the decoder's field (f), vertical-blank (v) and horizontal-blank (h)
// flags. The last Y, Cr and Cb values are kept in registers. The pixel count x
// advances only when a Y value is taken, as the document describes; the line
// count restarts each field, and the two interlaced fields are woven into one
// picture with y = 2*line + field. On every Y taken in active video the handler
// raises `cmp_en` for one cycle with `pos` holding that pixel's position, both
// registered. `frame_done` pulses for one cycle when vertical blanking begins
// after the active lines of field 1, i.e. once per complete frame.
// The stream format and the weaving of fields are this design's choices; the
// document says only that both fields are analysed.
module video_handler #(
  parameter int unsigned XW = 10,
  parameter int unsigned YW = 9
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [9:0]    vid_data,
  input  logic          vid_valid,
  input  logic          f, v, h,
  output logic [9:0]    y_val, cr_val, cb_val,
  output logic          cmp_en,
  output logic [XW-1:0] pos_x,
  output logic [YW-1:0] pos_y,
  output logic          frame_done
);
  logic [1:0]    phase;          // 0:Cb 1:Y 2:Cr 3:Y
  logic [XW-1:0] x_cnt;
  logic [YW-2:0] line_cnt;
  logic          h_q, v_q;
  logic          f_act;         // field of the active lines just seen
  wire           active = !v && !h;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0; x_cnt <= '0; line_cnt <= '0; h_q <= 1'b1; v_q <= 1'b1; f_act <= 1'b0;
      y_val <= '0; cr_val <= '0; cb_val <= '0;
      cmp_en <= 1'b0; pos_x <= '0; pos_y <= '0; frame_done <= 1'b0;
    end else begin
      cmp_en     <= 1'b0;
      frame_done <= 1'b0;
      h_q <= h;
      v_q <= v;
      if (!v) f_act <= f;
      if (v && !v_q && f_act) frame_done <= 1'b1;
      if (v) line_cnt <= '0;
      else if (h && !h_q) line_cnt <= line_cnt + 1'b1;   // end of an active line
      if (h || v) begin
        phase <= '0;
        x_cnt <= '0;
      end else if (vid_valid) begin
        phase <= phase + 2'd1;
        unique case (phase)
          2'd0: cb_val <= vid_data;
          2'd2: cr_val <= vid_data;
          default: begin
            y_val  <= vid_data;
            cmp_en <= active;
            pos_x  <= x_cnt;
            pos_y  <= {line_cnt, f};
            x_cnt  <= x_cnt + 1'b1;
          end
        endcase
      end
    end
  end
endmodule
