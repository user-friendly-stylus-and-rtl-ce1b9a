// area_map: decides what a click means, and holds the mode register.
// A click with x < 32 falls on the toolbar of fifteen 32-line buttons:
//   0 point, 1 line, 2 rectangle, 3 circle, 4 select, 5 delete, 6 move,
//   7 copy, 8 resize                      -> set the current command
//   9 no snapping, 10 snap to grid, 11 snap to point -> set the snap mode
//   12 colour                             -> step to the next of 8 colours
//   13, 14                                -> unused
// A click anywhere else is a drawing click: `draw_click` pulses with the
// position in `draw_pos`. A command change pulses `cmd_changed`.
// `snap_force_mem` is high in snap-to-point mode: the snapper then needs
// object memory. After reset: no command, no snapping, white.
// The button order, palette and reset state are this design's choices; the
// document says only that the toolbar selects commands and modes.
module area_map
  import cad_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     click,
  input  pos_t     pos,
  output command_t command,
  output logic     cmd_changed,
  output mode_t    mode,
  output color_t   color,
  output logic     snap_force_mem,
  output logic     draw_click,
  output pos_t     draw_pos
);
  logic [2:0] color_idx;
  logic [3:0] button;
  assign button = pos.y[8:5];

  always_comb begin
    unique case (color_idx)
      3'd0: color = 9'b111_111_111;   // white
      3'd1: color = 9'b111_000_000;   // red
      3'd2: color = 9'b000_111_000;   // green
      3'd3: color = 9'b000_000_111;   // blue
      3'd4: color = 9'b111_111_000;   // yellow
      3'd5: color = 9'b000_111_111;   // cyan
      3'd6: color = 9'b111_000_111;   // magenta
      default: color = 9'b111_100_000; // orange
    endcase
    snap_force_mem = (mode == SNAP_POINT);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      command <= CMD_NONE; mode <= SNAP_NONE; color_idx <= '0;
      cmd_changed <= 1'b0; draw_click <= 1'b0; draw_pos <= '0;
    end else begin
      cmd_changed <= 1'b0;
      draw_click  <= 1'b0;
      if (click) begin
        if (pos.x < 10'(TOOLBAR_W)) begin
          if (button <= 4'd8) begin
            command <= command_t'(button + 4'd1);
            cmd_changed <= 1'b1;
          end else if (button == 4'd9)  mode <= SNAP_NONE;
          else if (button == 4'd10) mode <= SNAP_GRID;
          else if (button == 4'd11) mode <= SNAP_POINT;
          else if (button == 4'd12) color_idx <= color_idx + 3'd1;
        end else begin
          draw_click <= 1'b1;
          draw_pos   <= pos;
        end
      end
    end
  end
endmodule
