// draw_line: the line command, a Bresenham line drawn one pixel per clock.
// Minor FSM, following the document's line-drawing state diagram:
//   IDLE -> GET_START (first click: store start, back to IDLE, `pending`)
//   IDLE -> GET_END (second click) -> SWAP (order the ends so x rises)
//        -> OCTANT -> VERTICAL | HORIZONTAL | ANGLED -> IDLE.
// `load` supplies both control points at once (used when a selected object
// is redrawn) and goes straight to SWAP. VERTICAL and HORIZONTAL step one
// coordinate only; ANGLED runs the integer Bresenham loop for any slope:
// err starts at dx - |dy|, and each clock moves x when 2*err >= -|dy| and y
// when 2*err <= dx. Both end points are drawn; a line of n pixels takes n
// clocks of `pix_valid`, then `done` pulses. `a_out`/`b_out` are the control
// points in the order they were given. `cancel` forgets a stored start point.
module draw_line
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
  typedef enum logic [2:0] {
    S_IDLE, S_GET_START, S_GET_END, S_SWAP, S_OCTANT, S_VERT, S_HORIZ, S_ANGLED
  } state_t;
  state_t state;
  pos_t   p0, p1;
  logic   have_start;
  logic signed [11:0] x, y, x1, y1, dx, dy, err, sy, e2;

  assign e2 = err <<< 1;
  assign busy = !(state inside {S_IDLE, S_GET_START}) || done;
  assign pending = have_start;

  always_ff @(posedge clk) begin
    if (rst || cancel) begin
      state <= S_IDLE; have_start <= 1'b0; pix_valid <= 1'b0; done <= 1'b0;
      p0 <= '0; p1 <= '0; a_out <= '0; b_out <= '0; pix_pos <= '0;
      {x, y, x1, y1, dx, dy, err, sy} <= '0;
    end else begin
      pix_valid <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE:
          if (load) begin
            a_out <= a_in; b_out <= b_in; p0 <= a_in; p1 <= b_in; state <= S_SWAP;
          end else if (next && !have_start) begin
            a_out <= pos; state <= S_GET_START;
          end else if (next) begin
            b_out <= pos; state <= S_GET_END;
          end
        S_GET_START: begin have_start <= 1'b1; state <= S_IDLE; end
        S_GET_END: begin
          have_start <= 1'b0; p0 <= a_out; p1 <= b_out; state <= S_SWAP;
        end
        S_SWAP: begin
          if (p0.x > p1.x) begin p0 <= p1; p1 <= p0; end
          state <= S_OCTANT;
        end
        S_OCTANT: begin
          x  <= 12'(p0.x);  y  <= 12'(p0.y);
          x1 <= 12'(p1.x);  y1 <= 12'(p1.y);
          dx <= 12'(p1.x) - 12'(p0.x);
          dy <= (p1.y >= p0.y) ? 12'(p1.y) - 12'(p0.y) : 12'(p0.y) - 12'(p1.y);
          sy <= (p1.y >= p0.y) ? 12'sd1 : -12'sd1;
          err <= (12'(p1.x) - 12'(p0.x)) -
                 ((p1.y >= p0.y) ? 12'(p1.y) - 12'(p0.y) : 12'(p0.y) - 12'(p1.y));
          if (p0.x == p1.x)      state <= S_VERT;
          else if (p0.y == p1.y) state <= S_HORIZ;
          else                   state <= S_ANGLED;
        end
        S_VERT, S_HORIZ, S_ANGLED: begin
          pix_valid <= 1'b1;
          pix_pos   <= '{y: y[8:0], x: x[9:0]};
          if (x == x1 && y == y1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if (state == S_VERT) begin
            y <= y + sy;
          end else if (state == S_HORIZ) begin
            x <= x + 12'sd1;
          end else begin
            if (e2 >= -dy && e2 <= dx) begin
              err <= err - dy + dx; x <= x + 12'sd1; y <= y + sy;
            end else if (e2 >= -dy) begin
              err <= err - dy; x <= x + 12'sd1;
            end else begin
              err <= err + dx; y <= y + sy;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
