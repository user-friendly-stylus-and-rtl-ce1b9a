// draw_circle: the circle command. The first click gives the centre, the
// second a point on the circle (or `load` gives both).
// The squared distance between them goes to the square-root unit, whose
// floor result is the radius r. The midpoint (Bresenham) circle loop then
// starts at (0, r) with decision value 1 - r; for each step it emits the
// eight mirror-image pixels (cx +- x, cy +- y) and (cx +- y, cy +- x), one per
// clock, then moves x one right and, when the decision value says so, y one
// down, until x > y. Mirror pixels that fall off the 640x480 screen are not
// emitted (`pix_valid` stays low for that clock). Where x = 0 or x = y some
// mirror pixels coincide and are emitted twice. `done` pulses at the end.
// The square-root unit's busy output is not needed (its done pulse is used)
// and is left unconnected in use.
module draw_circle
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
  typedef enum logic [2:0] {S_IDLE, S_SQUARE, S_SQRT_GO, S_SQRT, S_PLOT, S_STEP} state_t;
  state_t state;
  logic   have_start;
  logic [19:0] r2;
  logic [9:0]  root;
  logic        sq_start, sq_busy, sq_done;
  logic signed [11:0] cx, cy, x, y, d, px, py;
  logic [2:0]  oct;

  isqrt #(.W(20)) u_sqrt (.clk, .rst, .start(sq_start), .radicand(r2),
                          .busy(sq_busy), .done(sq_done), .root);

  assign busy = (state != S_IDLE) || done;
  assign pending = have_start;
  assign sq_start = (state == S_SQRT_GO);

  always_comb begin
    unique case (oct)
      3'd0: begin px = cx + x; py = cy + y; end
      3'd1: begin px = cx - x; py = cy + y; end
      3'd2: begin px = cx + x; py = cy - y; end
      3'd3: begin px = cx - x; py = cy - y; end
      3'd4: begin px = cx + y; py = cy + x; end
      3'd5: begin px = cx - y; py = cy + x; end
      3'd6: begin px = cx + y; py = cy - x; end
      default: begin px = cx - y; py = cy - x; end
    endcase
  end

  logic signed [11:0] ddx, ddy;
  always_ff @(posedge clk) begin
    if (rst || cancel) begin
      state <= S_IDLE; have_start <= 1'b0; pix_valid <= 1'b0; done <= 1'b0;
      a_out <= '0; b_out <= '0; pix_pos <= '0; r2 <= '0;
      {cx, cy, x, y, d, ddx, ddy} <= '0; oct <= '0;
    end else begin
      pix_valid <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_IDLE:
          if (load) begin
            a_out <= a_in; b_out <= b_in; state <= S_SQUARE;
            ddx <= 12'(b_in.x) - 12'(a_in.x); ddy <= 12'(b_in.y) - 12'(a_in.y);
          end else if (next && !have_start) begin
            a_out <= pos; have_start <= 1'b1;
          end else if (next) begin
            b_out <= pos; have_start <= 1'b0; state <= S_SQUARE;
            ddx <= 12'(pos.x) - 12'(a_out.x); ddy <= 12'(pos.y) - 12'(a_out.y);
          end
        S_SQUARE: begin
          r2 <= 20'(24'(ddx) * 24'(ddx) + 24'(ddy) * 24'(ddy));
          cx <= 12'(a_out.x); cy <= 12'(a_out.y);
          state <= S_SQRT_GO;
        end
        S_SQRT_GO: state <= S_SQRT;
        S_SQRT: if (sq_done) begin
          x <= '0; y <= 12'(root); d <= 12'sd1 - 12'(root); oct <= '0;
          state <= S_PLOT;
        end
        S_PLOT: begin
          pix_valid <= (px >= 0) && (px < 12'(H_ACTIVE)) && (py >= 0) && (py < 12'(V_ACTIVE));
          pix_pos   <= '{y: py[8:0], x: px[9:0]};
          oct <= oct + 3'd1;
          if (oct == 3'd7) state <= S_STEP;
        end
        S_STEP: begin
          if (d < 0) begin
            d <= d + (x <<< 1) + 12'sd3;
          end else begin
            d <= d + ((x - y) <<< 1) + 12'sd5;
            y <= y - 12'sd1;
          end
          x <= x + 12'sd1;
          if (x + 12'sd1 > ((d < 0) ? y : y - 12'sd1)) begin
            state <= S_IDLE; done <= 1'b1;
          end else state <= S_PLOT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
