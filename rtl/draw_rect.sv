// draw_rect: the rectangle command, an axis-aligned outline between two
// opposite corners, one pixel per clock.
// Minor FSM: the first click stores one corner (`pending`), the second the
// other (or `load` gives both). The corners are then swapped per axis, if
// needed, so that (x0,y0) is top left and (x1,y1) bottom right; this keeps
// the rest to four edge states: TOP (y0, x0..x1), BOTTOM (y1, x0..x1, only if
// y1 > y0), LEFT (x0, y0+1..y1-1) and RIGHT (x1, y0+1..y1-1, only if
// x1 > x0). Every outline pixel is drawn once; then `done` pulses.
// The document describes only the swapping of corners; the edge order is this
// design's choice.
module draw_rect
  import cad_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic cancel,
  input  logic next,
  input  pos_t pos,
  input  logic load,
  input  pos_t a_in,
  input  pos_t b_in,
  output logic busy,
  output logic pending,
  output logic pix_valid,
  output pos_t pix_pos,
  output logic done,
  output pos_t a_out,
  output pos_t b_out
);
  typedef enum logic [2:0] {S_IDLE, S_SWAP, S_TOP, S_BOTTOM, S_LEFT, S_RIGHT} state_t;
  state_t state;
  logic   have_start;
  logic [9:0] x0, x1, cx;
  logic [8:0] y0, y1, cy;

  assign busy = (state != S_IDLE) || done;
  assign pending = have_start;

  always_ff @(posedge clk) begin
    if (rst || cancel) begin
      state <= S_IDLE; have_start <= 1'b0; pix_valid <= 1'b0; done <= 1'b0;
      a_out <= '0; b_out <= '0; pix_pos <= '0;
      {x0, x1, cx, y0, y1, cy} <= '0;
    end else begin
      pix_valid <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE:
          if (load) begin
            a_out <= a_in; b_out <= b_in;
            x0 <= a_in.x; y0 <= a_in.y; x1 <= b_in.x; y1 <= b_in.y;
            state <= S_SWAP;
          end else if (next && !have_start) begin
            a_out <= pos; have_start <= 1'b1;
          end else if (next) begin
            b_out <= pos; have_start <= 1'b0;
            x0 <= a_out.x; y0 <= a_out.y; x1 <= pos.x; y1 <= pos.y;
            state <= S_SWAP;
          end
        S_SWAP: begin
          if (x0 > x1) begin x0 <= x1; x1 <= x0; cx <= x1; end else cx <= x0;
          if (y0 > y1) begin y0 <= y1; y1 <= y0; end
          state <= S_TOP;
        end
        S_TOP: begin
          pix_valid <= 1'b1; pix_pos <= '{y: y0, x: cx};
          if (cx == x1) begin
            cx <= x0;
            state <= (y1 > y0) ? S_BOTTOM : S_IDLE;
            done  <= !(y1 > y0);
          end else cx <= cx + 10'd1;
        end
        S_BOTTOM: begin
          pix_valid <= 1'b1; pix_pos <= '{y: y1, x: cx};
          if (cx == x1) begin
            cy <= y0 + 9'd1;
            if (y1 > y0 + 9'd1) state <= S_LEFT;
            else begin state <= S_IDLE; done <= 1'b1; end
          end else cx <= cx + 10'd1;
        end
        S_LEFT: begin
          pix_valid <= 1'b1; pix_pos <= '{y: cy, x: x0};
          if (cy == y1 - 9'd1) begin
            cy <= y0 + 9'd1;
            if (x1 > x0) state <= S_RIGHT;
            else begin state <= S_IDLE; done <= 1'b1; end
          end else cy <= cy + 9'd1;
        end
        S_RIGHT: begin
          pix_valid <= 1'b1; pix_pos <= '{y: cy, x: x1};
          if (cy == y1 - 9'd1) begin state <= S_IDLE; done <= 1'b1; end
          else cy <= cy + 9'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
